// tb_td_core: checks the TD fan-out and feedback paths:
//  - every link gets the trigger link word one clock later, unchanged;
//  - the SYNC line is re-encoded: each link carries the same Manchester
//    bit stream two clocks later, and never a violation;
//  - loop-back pulses return in the same clock on their own link;
//  - BUSY / SyncReset requests merge over enabled links only, one clock later;
//  - the event limit: blocks reported by a TI raise BUSY at the limit,
//    acknowledges lower it, and a front end reset SYNC command clears it.
module tb_td_core;
  import tcs_pkg::*;
  localparam int NL = 8;
  logic clk = 0, rst = 1;
  tlink_t tlink_in = '0;
  logic [1:0] sync_in = 2'b01;
  feedback_t fb_out;
  tlink_t [NL-1:0] tlink_out;
  logic [NL-1:0][1:0] sync_out;
  logic [NL-1:0] loop_out, loop_in = '0, link_en = '1, limit_busy;
  ti_status_t [NL-1:0] status_in = '0;
  logic [7:0] limit = '0;
  logic [NL-1:0][7:0] outstanding;
  logic sync_violation;
  int checks = 0, failures = 0;

  td_core #(.N_LINK(NL)) dut (.*);
  always #2 clk = ~clk;

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  tlink_t tl_h [$];
  logic [1:0] sy_h [$];
  feedback_t fb_h [$];

  task automatic send_bit(logic b);
    @(negedge clk) sync_in = {~b, b};
  endtask
  task automatic send_cmd(logic [3:0] c);
    for (int i = 0; i < 6; i++) send_bit(1);
    send_bit(0);
    for (int k = 3; k >= 0; k--) send_bit(c[k]);
    for (int i = 0; i < 6; i++) send_bit(1);
  endtask
  task automatic pulse_status(int l, bit blk, bit ack);
    @(negedge clk);
    status_in[l].blk_end = blk; status_in[l].roc_ack = ack;
    @(negedge clk);
    status_in[l].blk_end = 0; status_in[l].roc_ack = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 2000; c++) begin
      feedback_t e;
      @(negedge clk);
      tlink_in = tlink_t'($urandom);
      begin logic b; b = 1'($urandom); sync_in = {~b, b}; end
      loop_in = NL'($urandom);
      link_en = NL'($urandom);
      for (int l = 0; l < NL; l++) begin
        status_in[l].busy = ($urandom % 6 == 0);
        status_in[l].sync_reset_req = ($urandom % 9 == 0);
      end
      e = '0;
      for (int l = 0; l < NL; l++) if (link_en[l]) begin
        e.busy |= status_in[l].busy;
        e.sync_reset_req |= status_in[l].sync_reset_req;
      end
      tl_h.push_back(tlink_in); sy_h.push_back(sync_in); fb_h.push_back(e);
      #1;
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (loop_out[l] !== loop_in[l]) fail("loop-back");
        if (c >= 1 && tlink_out[l] !== tl_h[c - 1]) fail($sformatf("trigger link %0d", l));
        if (c >= 2 && sync_out[l] !== sy_h[c - 2]) fail($sformatf("SYNC link %0d at %0d", l, c));
      end
      checks++;
      if (c >= 1 && fb_out !== fb_h[c - 1]) fail($sformatf("feedback at %0d: %b exp %b", c, fb_out, fb_h[c - 1]));
    end
    // event limit on link 3
    status_in = '0; link_en = '1; limit = 8'd2; sync_in = 2'b01;
    repeat (4) @(negedge clk);
    pulse_status(3, 1, 0);
    checks++; if (fb_out.busy) fail("BUSY below limit");
    pulse_status(3, 1, 0);
    checks++; if (!fb_out.busy || outstanding[3] != 2) fail("no BUSY at limit");
    pulse_status(3, 0, 1);
    checks++; if (fb_out.busy) fail("BUSY after acknowledge");
    pulse_status(3, 1, 0);
    checks++; if (!fb_out.busy) fail("no BUSY at limit again");
    send_cmd(SC_FE_RESET);
    repeat (3) @(negedge clk);
    checks++; if (fb_out.busy || outstanding[3] != 0) fail("front end reset did not clear the limit");
    checks++; if (sync_violation) fail("violation on a clean line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
