// tb_td_event_limit: random block-end and acknowledge pulses with several
// limits (0 = pipeline, 1 = event locking, larger); a counter model predicts
// the number of outstanding blocks and BUSY (outstanding >= limit, never for
// limit 0) one clock later; clr must empty the count.
module tb_td_event_limit;
  logic clk = 0, rst = 1, clr = 0, blk_end = 0, roc_ack = 0;
  logic [7:0] limit = '0, outstanding;
  logic busy;
  int checks = 0, failures = 0, busy_seen = 0, model = 0;

  td_event_limit #(.CNT_W(8)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lims [4] = '{0, 1, 3, 6};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (lims[li]) begin
      limit = 8'(lims[li]);
      for (int c = 0; c < 1500; c++) begin
        @(negedge clk);
        blk_end = ($urandom % 3) == 0;
        roc_ack = ($urandom % 3) == 0 && (model > 0 || $urandom % 4 == 0);
        clr = (c == 700);
        if (clr) model = 0;
        else if (blk_end && !roc_ack) model++;
        else if (roc_ack && !blk_end && model > 0) model--;
        if (model > 20) begin blk_end = 0; model--; end   // keep the count small
        @(posedge clk); #1;
        checks++;
        if (outstanding !== 8'(model) || busy !== (lims[li] != 0 && model >= lims[li])) begin
          failures++;
          if (failures < 6) $display("FAIL limit %0d: out %0d exp %0d busy %0d", lims[li], outstanding, model, busy);
        end
        busy_seen += busy;
      end
    end
    checks++;
    if (busy_seen < 100) begin failures++; $display("FAIL busy never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
