// tb_ti_latency_meter: loops loop_tx back to loop_rx through a testbench
// delay of R clocks for many values of R, checks round_trip == R and
// one_way == ceil(R/2), and checks the timeout when nothing comes back.
module tb_ti_latency_meter;
  logic clk = 0, rst = 1, start = 0, loop_tx, loop_rx, done, timeout;
  logic [9:0] round_trip, one_way;
  int checks = 0, failures = 0;
  int R = 5;
  bit cut = 0;
  logic [1023:0] line = '0;

  ti_latency_meter #(.CNT_W(10)) dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) line <= {line[1022:0], loop_tx};
  assign loop_rx = !cut && line[R-1];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 1; r < 400; r += 7) begin
      R = r;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done && !timeout) @(negedge clk);
      checks++;
      if (!done || round_trip != 10'(r) || one_way != 10'((r + 1) / 2)) begin
        failures++;
        $display("FAIL R=%0d: done %0d rt %0d ow %0d", r, done, round_trip, one_way);
      end
      repeat (1030) @(negedge clk);   // let the old pulse leave the delay line
    end
    cut = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (1100) @(negedge clk);
    checks++;
    if (!timeout || done) begin failures++; $display("FAIL no timeout"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
