// tb_ti_sync_delay: for several (target, one_way) pairs it feeds random
// symbols and checks that each one comes out target - one_way + 1 clocks
// later (one clock for the output register; delay 0 when one_way >= target).
module tb_ti_sync_delay;
  logic clk = 0, rst = 1;
  logic [8:0] target = '0, one_way = '0;
  logic [1:0] din = 2'b01, dout;
  logic [1:0] hist [$];
  int checks = 0, failures = 0;

  ti_sync_delay #(.MAX_DELAY(512)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tg [5] = '{300, 300, 200, 40, 10};
    int ow [5] = '{188, 5, 63, 7, 30};
    foreach (tg[k]) begin
      int d;
      d = (tg[k] > ow[k]) ? tg[k] - ow[k] : 0;
      rst = 1; target = 9'(tg[k]); one_way = 9'(ow[k]);
      hist.delete();
      repeat (3) @(negedge clk);
      rst = 0;
      for (int c = 0; c < 1500; c++) begin
        din = 2'($urandom);
        hist.push_back(din);
        @(posedge clk); #1;
        if (c >= d) begin
          checks++;
          if (dout !== hist[c - d]) begin
            failures++;
            if (failures < 6) $display("FAIL delay %0d at %0d: %b exp %b", d, c, dout, hist[c - d]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
