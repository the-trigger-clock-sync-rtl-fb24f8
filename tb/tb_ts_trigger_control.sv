// tb_ts_trigger_control: directed scenarios with independent expectations:
// disabled acceptance, source priority, the minimum-spacing trigger rule,
// one main trigger per 16 ns slot, BUSY throttling and busy-time counting,
// the SyncEvent wait (inhibit until BUSY has come and gone), periodic
// SyncEvents every sync_period triggers, the SyncReset request marker and
// the gating of sub-TS triggers.
module tb_ts_trigger_control;
  import tcs_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] phase = '0;
  logic enable = 0;
  feedback_t fb = '0;
  logic gtp_valid = 0, gtp_sync = 0, ext_valid = 0, ext_sync = 0, vme_trig = 0, vme_sync_event = 0;
  logic [9:0] gtp_etype = '0, ext_etype = '0, vme_etype = '0;
  logic [3:0][2:0] ptype = '0, part_acc;
  logic part_hold = 0, srr_clear = 0, srr_flag, sync_wait;
  logic [7:0] min_gap = 8'd1;
  logic [15:0] sync_period = '0;
  trig_t acc;
  logic [31:0] trig_count, busy_time;
  int checks = 0, failures = 0;

  ts_trigger_control #(.NP(4)) dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) phase <= phase + 1'b1;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask
  task automatic expect_acc(bit v, tw_hdr_e h, logic [9:0] e, bit s, string what);
    checks++;
    if (acc.valid !== v || (v && (acc.hdr !== h || acc.etype !== e || acc.sync_ev !== s)))
      fail($sformatf("%s: got v%0d h%b e%h s%0d", what, acc.valid, acc.hdr, acc.etype, acc.sync_ev));
  endtask
  task automatic clear_in();
    gtp_valid = 0; ext_valid = 0; vme_trig = 0; vme_sync_event = 0; gtp_sync = 0; ext_sync = 0;
  endtask
  task automatic to_phase(int p);
    @(negedge clk);
    while (phase != 2'(p)) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // disabled
    gtp_valid = 1; gtp_etype = 10'h11; #1 expect_acc(0, TW_GTP, 0, 0, "disabled");
    @(negedge clk) enable = 1;
    to_phase(0);
    // priority GTP > EXT > VME, inserted SyncEvent first
    gtp_valid = 1; ext_valid = 1; ext_etype = 10'h22; vme_trig = 1; vme_etype = 10'h33;
    #1 expect_acc(1, TW_GTP, 10'h11, 0, "gtp priority");
    to_phase(0); gtp_valid = 0;
    #1 expect_acc(1, TW_EXT, 10'h22, 0, "ext priority");
    to_phase(0); ext_valid = 0;
    #1 expect_acc(1, TW_VME_TRIG, 10'h33, 0, "vme trigger");
    clear_in();
    // one per slot with min_gap 1: a candidate every clock gives one per slot
    to_phase(0);
    gtp_valid = 1; n = 0;
    for (int c = 0; c < 400; c++) begin #1 n += acc.valid; @(negedge clk); end
    checks++;
    if (n != 100) fail($sformatf("%0d triggers in 100 slots", n));
    // trigger rule: min_gap 10 gives one trigger every 10 clocks at most
    min_gap = 8'd10; n = 0;
    for (int c = 0; c < 400; c++) begin #1 n += acc.valid; @(negedge clk); end
    checks++;
    if (n < 33 || n > 40) fail($sformatf("min_gap 10: %0d triggers in 400 clocks", n));
    min_gap = 8'd1; clear_in();
    // BUSY throttles and is counted
    repeat (4) @(negedge clk);
    begin
      logic [31:0] bt0;
      bt0 = busy_time;
      fb.busy = 1; gtp_valid = 1;
      for (int c = 0; c < 50; c++) begin #1 checks++; if (acc.valid) fail("trigger while BUSY"); @(negedge clk); end
      fb.busy = 0;
      checks++;
      if (busy_time - bt0 != 50) fail($sformatf("busy_time counted %0d of 50", busy_time - bt0));
    end
    clear_in();
    // inserted SyncEvent: type 0, then wait until BUSY came and went
    to_phase(0);
    vme_sync_event = 1; #1 expect_acc(1, TW_VME_TRIG, 10'd0, 1, "inserted SyncEvent");
    @(negedge clk); clear_in();
    gtp_valid = 1;
    repeat (8) begin #1 checks++; if (acc.valid) fail("trigger during SyncEvent wait"); @(negedge clk); end
    fb.busy = 1; repeat (5) @(negedge clk);
    fb.busy = 0; @(negedge clk);
    to_phase(0);
    #1 expect_acc(1, TW_GTP, 10'h11, 0, "trigger after SyncEvent wait");
    clear_in();
    // periodic SyncEvent every 5 triggers, keeping the type
    sync_period = 16'd5; n = 0;
    for (int k = 0; k < 15; k++) begin
      to_phase(0);
      gtp_valid = 1;
      #1 checks++;
      if (!acc.valid) fail("periodic: trigger missing");
      if (acc.sync_ev !== ((k % 5) == 4)) fail($sformatf("periodic: trigger %0d sync_ev %0d", k, acc.sync_ev));
      if (acc.sync_ev) begin
        n++;
        @(negedge clk); gtp_valid = 0;
        fb.busy = 1; repeat (3) @(negedge clk); fb.busy = 0; @(negedge clk);
      end else begin
        @(negedge clk); gtp_valid = 0;
      end
    end
    checks++;
    if (n != 3) fail("periodic SyncEvent count");
    sync_period = '0; clear_in();
    // SyncReset request
    @(negedge clk) fb.sync_reset_req = 1;
    @(negedge clk) fb.sync_reset_req = 0;
    checks++;
    if (!srr_flag) fail("request not latched");
    gtp_valid = 1;
    repeat (8) begin #1 checks++; if (acc.valid) fail("trigger while request pending"); @(negedge clk); end
    srr_clear = 1; @(negedge clk) srr_clear = 0;
    to_phase(0);
    #1 expect_acc(1, TW_GTP, 10'h11, 0, "after request cleared");
    clear_in();
    // sub-TS triggers: passed unless inhibited or held
    ptype = {3'd1, 3'd2, 3'd3, 3'd4};
    #1 checks++; if (part_acc !== ptype) fail("partition not passed");
    part_hold = 1;
    #1 checks++; if (part_acc !== '0) fail("partition passed while held");
    part_hold = 0; fb.busy = 1;
    #1 checks++; if (part_acc !== '0) fail("partition passed while BUSY");
    fb.busy = 0;
    checks++;
    if (trig_count < 140) fail("trigger count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
