// tb_ti_trigger_fifo: words arrive every 16 ns at a link phase unrelated to
// the TI slot tick. After trig_start the FIFO must deliver the words in
// order from the first word written after trig_stop, exactly one per tick,
// one clock after the tick, for several start delays. It also checks that
// nothing is read before trig_start, underflow when trig_start comes before
// any word, and overflow when DEPTH words are exceeded.
module tb_ti_trigger_fifo;
  import tcs_pkg::*;
  localparam int DEPTH = 128;
  logic clk = 0, rst = 1, tick, trig_stop = 0, trig_start = 0, fe_reset = 0;
  tlink_t link = '0;
  logic rd_valid, reading, underflow, overflow;
  logic [15:0] rd_word;
  logic [7:0] level;
  int checks = 0, failures = 0;
  logic [1:0] ph = '0;

  ti_trigger_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) ph <= ph + 1'b1;
  assign tick = (ph == 2'd0);

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  // link source: one word every 4 clocks at link phase lph, counting up
  bit src_on = 0;
  logic [15:0] next_w = '0;
  logic [1:0] lph = 2'd2;
  always @(negedge clk) begin
    link.valid = 1'b0;
    if (src_on && ph == lph) begin
      link.valid = 1'b1;
      link.word  = next_w;
      next_w++;
    end
  end

  // read checker
  logic [15:0] exp_w;
  bit chk_on = 0;
  int got = 0;
  logic tick_q = 0;
  always @(posedge clk) begin
    tick_q <= tick && reading;
    #1;
    if (chk_on) begin
      checks++;
      if (rd_valid !== tick_q) fail($sformatf("rd_valid %0d tick_q %0d", rd_valid, tick_q));
      if (rd_valid) begin
        if (rd_word !== exp_w) fail($sformatf("word %h expected %h", rd_word, exp_w));
        exp_w++; got++;
      end
    end else if (rd_valid) fail("read before trig_start");
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int run = 0; run < 4; run++) begin
      lph = 2'(run + 1);
      pulse(trig_stop);
      @(posedge clk);
      exp_w = next_w;
      src_on = 1;
      repeat (40 + run * 60) @(negedge clk);
      // start at a slot boundary, as a SYNC command would arrive
      while (ph != 2'd3) @(negedge clk);
      chk_on = 1;
      pulse(trig_start);
      repeat (1200) @(negedge clk);
      checks++;
      if (underflow || overflow) fail("error flag in normal run");
      pulse(fe_reset);
      chk_on = 0;
      src_on = 0;
      repeat (8) @(negedge clk);
    end
    // underflow: start reading an empty FIFO
    pulse(trig_start);
    repeat (8) @(negedge clk);
    checks++;
    if (!underflow) fail("no underflow");
    // overflow: write more than DEPTH words without reading
    rst = 1; @(negedge clk); rst = 0;
    src_on = 1;
    repeat (4 * (DEPTH + 4)) @(negedge clk);
    checks++;
    if (!overflow) fail("no overflow");
    checks++;
    if (got < 1000) fail($sformatf("only %0d words read", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
