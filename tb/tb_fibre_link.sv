// tb_fibre_link: drives random words into the fibre model and checks that
// each comes out exactly DELAY clocks later, and that the output is idle
// before the line has filled after reset.
module tb_fibre_link;
  localparam int D = 13, W = 8;
  logic clk = 0, rst = 1;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  fibre_link #(.DELAY(D), .W(W), .IDLE(8'hA5)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 400; c++) begin
      din = W'($urandom);
      hist.push_back(din);
      @(posedge clk);
      #1;
      checks++;
      if (c + 1 < D) begin
        if (dout !== 8'hA5) begin failures++; $display("FAIL idle at %0d: %h", c, dout); end
      end else if (dout !== hist[c + 1 - D]) begin
        failures++; $display("FAIL at %0d: got %h expected %h", c, dout, hist[c + 1 - D]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
