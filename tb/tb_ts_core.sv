// tb_ts_core: Trigger Supervisor end to end, from trigger inputs and VME
// actions to the trigger link words and the SYNC line.
// A testbench SYNC decoder (Manchester -> start bit + 4 code bits) and a
// link monitor record what the TS sends. Checked:
//  - the link is idle before run start and after run stop;
//  - after run start the link carries one valid word per 16 ns slot, and
//    SYNC "trigger start" follows after start_delay slots;
//  - a GTP input pulse, through the loaded lookup tables, gives exactly one
//    GTP trigger word with the loaded event type, and its quadrant keeps a
//    fixed offset from the input's clock phase;
//  - VME trigger and VME command words;
//  - BUSY feedback blocks triggers and is counted as busy time;
//  - timer words count slots, and are cleared by an FE reset SYNC command;
//  - SYNC commands from the VME port are sent; run stop sends "trigger stop".
module tb_ts_core;
  import tcs_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic [N_GTP-1:0] gtp = '0;
  logic [N_EXT-1:0] ext = '0;
  logic [N_ASY-1:0] asy = '0;
  ts_cfg_t cfg;
  lut_wr_t lut_wr = '0;
  logic vme_trig = 0, vme_sync_event = 0, vme_cmd_valid = 0;
  logic [9:0] vme_etype = '0;
  logic [11:0] vme_cmd = '0;
  logic run_start = 0, run_stop = 0, srr_clear = 0;
  logic sync_cmd_valid = 0;
  logic [3:0] sync_cmd = '0;
  logic sync_cmd_ready;
  feedback_t fb = '0;
  tlink_t tlink;
  logic [1:0] sync_manch, phase;
  logic running, link_en, srr_flag, sync_wait;
  logic [31:0] trig_count, busy_time;
  logic ev_rd = 0, ev_avail, ev_ovf;
  logic [94:0] ev_data;
  logic [N_PART-1:0] pev_rd = '0, pev_avail, pev_ovf;
  logic [N_PART-1:0][82:0] pev_data;

  ts_core dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic fail(string s);
    failures++;
    $display("FAIL cyc %0d: %s", cyc, s);
  endtask

  // ---------------- monitors ----------------
  int n_valid = 0, n_gtp = 0, n_vtrig = 0, n_vcmd = 0, n_timer = 0, last_valid = -1;
  int bad_spacing = 0;
  logic [9:0] gtp_etype_seen [$];
  logic [1:0] gtp_quad_seen [$];
  int last_timer_cyc = -1;
  logic [11:0] last_timer = '0, first_timer_after = '0;
  bit timer_step_bad = 0, want_first_timer = 0, hold_step = 0;
  always @(posedge clk) if (!rst && tlink.valid) begin
    n_valid++;
    if (last_valid >= 0 && cyc - last_valid != 4) bad_spacing++;
    last_valid = cyc;
    case (tw_hdr_e'(tlink.word[15:12]))
      TW_GTP:      begin n_gtp++; gtp_etype_seen.push_back(tlink.word[9:0]); gtp_quad_seen.push_back(tlink.word[11:10]); end
      TW_VME_TRIG: begin n_vtrig++; if (tlink.word[9:0] != 10'd300) fail("VME trigger event type"); end
      TW_VME_CMD:  begin n_vcmd++; if (tlink.word[11:0] != 12'hABC) fail("VME command value"); end
      TW_SYNC_CHK: begin
        n_timer++;
        if (want_first_timer) begin first_timer_after = tlink.word[11:0]; want_first_timer = 0; end
        else if (!hold_step && last_timer_cyc >= 0 && 12'(last_timer + 12'((cyc - last_timer_cyc) / 4)) != tlink.word[11:0])
          timer_step_bad = 1;
        last_timer = tlink.word[11:0]; last_timer_cyc = cyc;
      end
      default: ;
    endcase
  end

  // SYNC line decoder (independent of the RTL decoder)
  int ones = 0, nbit = -1;
  logic [3:0] shf;
  sync_cmd_e got_cmd [$];
  int got_cyc [$];
  always @(posedge clk) if (!rst) begin
    logic b;
    if (sync_manch != {~sync_manch[0], sync_manch[0]}) fail("SYNC line not Manchester");
    b = sync_manch[0];
    if (nbit < 0) begin
      if (!b && ones >= 4) nbit = 0;
      ones = b ? ones + 1 : 0;
    end else begin
      shf = {shf[2:0], b};
      nbit++;
      if (nbit == 4) begin
        got_cmd.push_back(sync_cmd_e'(shf)); got_cyc.push_back(cyc);
        nbit = -1; ones = 0;
      end
    end
  end

  function automatic int find_cmd(sync_cmd_e c, int from);
    for (int i = 0; i < got_cmd.size(); i++) if (got_cmd[i] == c && got_cyc[i] >= from) return got_cyc[i];
    return -1;
  endfunction

  task automatic lut(int tbl, int addr, int data);
    @(negedge clk);
    lut_wr = '{en: 1'b1, tbl: 4'(tbl), addr: 15'(addr), data: 11'(data)};
    @(negedge clk);
    lut_wr = '0;
  endtask

  // GTP pulses: record the slot phase at the input edge
  logic [1:0] in_phase [$];
  task automatic gtp_pulse();
    @(negedge clk);
    gtp[0] = 1; in_phase.push_back(phase);
    @(negedge clk);
    gtp[0] = 0;
    repeat (12 + $urandom % 9) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1, n_before;
  initial begin
    cfg = '0;
    cfg.in_enable[0] = 1'b1;
    for (int p = 0; p < N_PART; p++) begin
      for (int k = 0; k < 5; k++) begin cfg.part_sel_gtp[p][k] = 5'd29; cfg.part_sel_ext[p][k] = 5'd29; end
      for (int k = 0; k < 3; k++) cfg.part_sel_asy[p][k] = 4'd14;
    end
    cfg.start_delay = 16'd10;
    cfg.min_gap     = 8'd4;
    cfg.sync_period = 16'd0;
    cfg.sync_align  = 2'd0;
    repeat (4) @(negedge clk);
    rst = 0;
    // GTP input 0 alone -> class 1 in table 0; all-zero groups -> class 0;
    // second level {0,0,1} -> event type 77
    lut(0, 0, 0); lut(0, 1, 1); lut(1, 0, 0); lut(2, 0, 0);
    lut(3, 1, 77);
    repeat (50) @(negedge clk);
    checks++;
    if (n_valid != 0 || got_cmd.size() != 0) fail("link or SYNC active before run start");

    // ---- run start ----
    t0 = cyc;
    @(negedge clk) run_start = 1; @(negedge clk) run_start = 0;
    wait (running);
    repeat (30) @(negedge clk);   // the SYNC frame ends after acceptance
    t1 = find_cmd(SC_TRIG_START, t0);
    checks++;
    if (t1 < 0) fail("no trigger start on SYNC");
    else if (t1 - t0 < 10 * 4 || t1 - t0 > 10 * 4 + 40) fail($sformatf("trigger start after %0d clocks", t1 - t0));
    checks++;
    if (n_valid < 10) fail($sformatf("only %0d link words before trigger start", n_valid));

    // ---- GTP triggers ----
    for (int i = 0; i < 40; i++) gtp_pulse();
    repeat (20) @(negedge clk);
    checks++;
    if (n_gtp != 40 || trig_count != 40) fail($sformatf("GTP words %0d, count %0d, expected 40", n_gtp, trig_count));
    for (int i = 0; i < gtp_etype_seen.size() && i < in_phase.size(); i++) begin
      checks++;
      if (gtp_etype_seen[i] != 10'd77) fail("GTP event type");
      checks++;
      if (2'(gtp_quad_seen[i] - in_phase[i]) != 2'(gtp_quad_seen[0] - in_phase[0]))
        fail($sformatf("trigger %0d quadrant %0d, input phase %0d: latency not fixed", i, gtp_quad_seen[i], in_phase[i]));
    end

    // ---- VME trigger and command ----
    @(negedge clk); while (phase != 0) @(negedge clk);
    vme_etype = 10'd300; vme_trig = 1; @(negedge clk) vme_trig = 0;
    repeat (10) @(negedge clk);
    vme_cmd = 12'hABC; vme_cmd_valid = 1; @(negedge clk) vme_cmd_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_vtrig != 1 || n_vcmd != 1) fail($sformatf("VME trigger words %0d, command words %0d", n_vtrig, n_vcmd));

    // ---- BUSY ----
    n_before = n_gtp;
    fb.busy = 1;
    t0 = busy_time;
    for (int i = 0; i < 5; i++) gtp_pulse();
    repeat (10) @(negedge clk);
    checks++;
    if (n_gtp != n_before) fail("trigger accepted while BUSY");
    checks++;
    if (busy_time - t0 < 60) fail($sformatf("busy time %0d", busy_time - t0));
    fb.busy = 0;
    void'(in_phase.pop_back()); void'(in_phase.pop_back()); void'(in_phase.pop_back());
    void'(in_phase.pop_back()); void'(in_phase.pop_back());

    // ---- SYNC commands from VME; FE reset clears the timer ----
    t0 = cyc;
    @(negedge clk) sync_cmd = SC_GTP_STAT_RST; sync_cmd_valid = 1;
    while (!sync_cmd_ready) @(negedge clk);
    @(negedge clk) sync_cmd_valid = 0;
    repeat (100) @(negedge clk);
    @(negedge clk) sync_cmd = SC_FE_RESET; sync_cmd_valid = 1;
    while (!sync_cmd_ready) @(negedge clk);
    // a word formed before the reset may still be on its way: no step check
    // across the reset, and the first word counted is 2 slots later
    hold_step = 1;
    @(negedge clk) sync_cmd_valid = 0;
    repeat (7) @(negedge clk);
    want_first_timer = 1;
    hold_step = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (find_cmd(SC_GTP_STAT_RST, t0) < 0 || find_cmd(SC_FE_RESET, t0) < 0) fail("VME SYNC commands not sent");
    checks++;
    if (first_timer_after > 12'd4) fail($sformatf("timer after FE reset %0d", first_timer_after));
    checks++;
    if (timer_step_bad) fail("timer words do not count slots");
    checks++;
    if (bad_spacing != 0) fail($sformatf("%0d link words not 4 clocks apart", bad_spacing));

    // ---- run stop ----
    t0 = cyc;
    @(negedge clk) run_stop = 1; @(negedge clk) run_stop = 0;
    wait (!link_en);
    repeat (40) @(negedge clk);
    t1 = find_cmd(SC_TRIG_STOP, t0);
    checks++;
    if (t1 < 0) fail("no trigger stop on SYNC");
    else if (t1 - t0 < 10 * 4) fail("trigger stop before the drain delay");
    n_before = n_valid;
    gtp_pulse();
    repeat (100) @(negedge clk);
    checks++;
    if (n_valid != n_before || running) fail("link words or triggers after run stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
