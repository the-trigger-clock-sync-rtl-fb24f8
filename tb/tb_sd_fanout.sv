// tb_sd_fanout: random TCS bundles must reach every slot unchanged in the
// same clock; random status from the slots must come back OR-merged over the
// masked-in slots only, one clock later.
module tb_sd_fanout;
  localparam int NS = 16, DW = 19, UW = 2;
  logic clk = 0, rst = 1;
  logic [DW-1:0] down_in = '0;
  logic [NS-1:0][DW-1:0] down_out;
  logic [NS-1:0][UW-1:0] up_in = '0;
  logic [NS-1:0] slot_mask = '0;
  logic [UW-1:0] up_out;
  int checks = 0, failures = 0, merged_hi = 0;

  sd_fanout #(.N_SLOT(NS), .DOWN_W(DW), .UP_W(UW)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [UW-1:0] exp_up;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      down_in = DW'($urandom);
      slot_mask = NS'($urandom);
      for (int s = 0; s < NS; s++) up_in[s] = ($urandom % 10 == 0) ? UW'($urandom) : '0;
      exp_up = '0;
      for (int s = 0; s < NS; s++) if (slot_mask[s]) exp_up |= up_in[s];
      #1;
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (down_out[s] !== down_in) begin failures++; $display("FAIL fan-out slot %0d", s); end
      end
      @(posedge clk); #1;
      checks++;
      if (up_out !== exp_up) begin failures++; $display("FAIL merge got %b exp %b", up_out, exp_up); end
      merged_hi += (exp_up != 0);
    end
    checks++;
    if (merged_hi < 200) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
