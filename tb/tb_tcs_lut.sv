// tb_tcs_lut: writes a pattern into the lookup table and reads it back,
// checking the one-clock read latency and that later writes overwrite.
module tb_tcs_lut;
  localparam int AW = 10, DW = 4;
  logic clk = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [DW-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  tcs_lut #(.AW(AW), .DW(DW)) dut (.*);
  always #2 clk = ~clk;

  function automatic logic [DW-1:0] pat(int a, int k);
    return DW'((a * 7 + k * 3 + (a >> 4)) & 15);
  endfunction

  task automatic check(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      for (int a = 0; a < 2**AW; a++) begin
        @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = pat(a, k);
      end
      @(negedge clk); wr_en = 0;
      for (int a = 0; a < 2**AW; a++) begin
        @(negedge clk); rd_addr = AW'(a);
        @(negedge clk); check(rd_data, pat(a, k), $sformatf("addr %0d pass %0d", a, k));
      end
    end
    // read latency: the output changes only after the clock edge
    @(negedge clk); rd_addr = 10'd5;
    @(negedge clk); rd_addr = 10'd6;
    #1 check(rd_data, pat(5, 1), "registered read holds old address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
