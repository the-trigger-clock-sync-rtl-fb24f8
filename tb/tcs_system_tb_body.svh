// tcs_system_tb_body.svh: end-to-end test sequence of the whole trigger
// system, shared by the reduced-size and the full-size testbench. The
// including module defines NTD and NLK (TD boards and TI links per TD),
// instantiates nothing else and includes this file.
//
// A testbench TS operator (LUT loading, VME actions), ROC models (one per
// TI: read every record, acknowledge every block unless held) and front end
// BUSY drive the design through one complete run:
//   latency measurement -> clock re-sync -> FE reset -> trigger stop ->
//   run start -> triggers -> trigger rule -> BUSY -> event limit ->
//   SyncEvent (VME-inserted, LUT-marked, periodic) -> SyncReset request ->
//   run stop.
// Every clock, all TIs decoding standard triggers must drive their front end
// trigger in the same clock (fixed latency across fibre lengths). Each
// mechanism is counted; one that never happened is a failure. The TS event
// data is read out as it arrives and must hold one numbered record per
// accepted trigger, and one per partition 1 trigger.

  localparam int NTI = NTD * NLK;
  localparam int NFE = 16;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic [N_GTP-1:0] gtp = '0;
  logic [N_EXT-1:0] ext = '0;
  logic [N_ASY-1:0] asy = '0;
  ts_cfg_t ts_cfg;
  lut_wr_t lut_wr = '0;
  logic vme_trig = 0, vme_sync_event = 0, vme_cmd_valid = 0;
  logic [9:0] vme_etype = '0;
  logic [11:0] vme_cmd = '0;
  logic run_start = 0, run_stop = 0, srr_clear = 0;
  logic sync_cmd_valid = 0;
  logic [3:0] sync_cmd = '0;
  logic sync_cmd_ready, ts_running, ts_srr_flag, ts_sync_wait;
  logic [31:0] ts_trig_count, ts_busy_time;
  logic [NTD-1:0][NLK-1:0] td_link_en, td_limit_busy;
  logic [NTD-1:0][7:0] td_limit;
  logic ti_meas_start = 0;
  ti_cfg_t [NTI-1:0] ti_cfg;
  logic [NTI-1:0][NFE-1:0] fe_busy, fe_trig, fe_reset;
  logic [NFE-1:0] fe_slot_mask;
  logic [NTI-1:0][9:0] ti_trig_etype;
  logic [NTI-1:0] roc_rd, roc_ack, roc_srr, roc_avail, roc_irq, roc_sync_pend;
  logic [NTI-1:0][93:0] roc_data;
  logic [NTI-1:0][9:0] ti_one_way;
  logic [NTI-1:0] ti_lat_done, ti_fifo_err, ti_sync_err, ti_sync_violation;
  logic [NTI-1:0][1:0] ti_phase;
  logic [NTI-1:0][31:0] ti_trig_num;
  logic ts_ev_avail, ts_ev_ovf;
  logic [94:0] ts_ev_data;
  logic [N_PART-1:0] ts_pev_avail, ts_pev_ovf;
  logic [N_PART-1:0][82:0] ts_pev_data;
  wire ts_ev_rd = ts_ev_avail;               // the TS event data is read out at once
  wire [N_PART-1:0] ts_pev_rd = ts_pev_avail;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL cyc %0d: %s", cyc, s);
  endtask

  // the last TI decodes partition 1 only; all others decode standard words
  localparam int PTI = NTI - 1;

  // ---------------- TS event data monitor ----------------
  // main records: trigger numbers 1, 2, 3 ... and rising time stamps;
  // partition 1 records: type 5 (as loaded), numbers 1, 2, 3 ...
  int n_ts_ev = 0, n_ts_ev_bad = 0, n_ts_ev_se = 0, n_ts_pev = 0, n_ts_pev_bad = 0;
  logic [47:0] ts_ev_last_t = '0;
  always @(posedge clk) if (!rst) begin
    if (ts_ev_avail) begin
      n_ts_ev++;
      if (ts_ev_data[94:63] != 32'(n_ts_ev) || (n_ts_ev > 1 && ts_ev_data[62:15] <= ts_ev_last_t)) n_ts_ev_bad++;
      if (ts_ev_data[10]) n_ts_ev_se++;
      ts_ev_last_t = ts_ev_data[62:15];
    end
    if (ts_pev_avail[0]) begin
      n_ts_pev++;
      if (ts_pev_data[0][82:51] != 32'(n_ts_pev) || ts_pev_data[0][2:0] != 3'd5) n_ts_pev_bad++;
    end
    if (ts_pev_avail[3:1] != '0) n_ts_pev_bad++;
  end

  // ---------------- front end monitor ----------------
  int n_aligned = 0, n_part = 0, n_fer_clk = 0, n_misaligned = 0, n_bad_type = 0;
  int fe_trig_cnt [NTI];
  always @(posedge clk) if (!rst) begin
    logic t0v;
    t0v = fe_trig[0][0];
    for (int i = 0; i < PTI; i++) begin
      if (fe_trig[i][0] !== t0v) n_misaligned++;
      if (fe_trig[i] != {NFE{fe_trig[i][0]}}) n_misaligned++;
      if (fe_trig[i][0]) fe_trig_cnt[i]++;
    end
    if (t0v) begin
      n_aligned++;
      for (int i = 0; i < PTI; i++) if (ti_trig_etype[i] != ti_trig_etype[0]) n_bad_type++;
    end
    if (fe_trig[PTI][0]) begin
      fe_trig_cnt[PTI]++;
      n_part++;
      if (ti_trig_etype[PTI] != 10'd5) n_bad_type++;
    end
    if (&fe_reset[0]) n_fer_clk++;
  end

  // ---------------- ROC models ----------------
  bit ack_hold [NTI];
  int n_read [NTI], n_ack [NTI];
  for (genvar i = 0; i < NTI; i++) begin : g_roc
    initial begin
      ack_hold[i] = 0; n_read[i] = 0; n_ack[i] = 0;
      roc_rd[i] = 0; roc_ack[i] = 0; roc_srr[i] = 0;
      forever begin
        @(negedge clk);
        roc_rd[i] = 0; roc_ack[i] = 0;
        if (roc_avail[i]) begin roc_rd[i] = 1; n_read[i]++; end
        else if (roc_irq[i] && !ack_hold[i] && $urandom % 3 == 0) begin roc_ack[i] = 1; n_ack[i]++; end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_lat = 0, n_resync = 0, n_rule = 0, n_busy = 0, n_limit = 0;
  int n_se_vme = 0, n_se_lut = 0, n_se_per = 0, n_srr = 0, n_syncpend = 0;
  logic sw_q = 0;
  always @(posedge clk) begin
    if (|roc_sync_pend) n_syncpend++;
  end

  // ---------------- stimulus helpers ----------------
  task automatic lut(int tbl, int addr, int data);
    @(negedge clk);
    lut_wr = '{en: 1'b1, tbl: 4'(tbl), addr: 15'(addr), data: 11'(data)};
    @(negedge clk);
    lut_wr = '0;
  endtask

  task automatic sync_send(logic [3:0] c);
    @(negedge clk) sync_cmd = c; sync_cmd_valid = 1;
    while (!sync_cmd_ready) @(negedge clk);
    @(negedge clk) sync_cmd_valid = 0;
  endtask

  task automatic pulse_in(int k, int gap);
    @(negedge clk) gtp[k] = 1;
    @(negedge clk) gtp[k] = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic settle();
    repeat (700) @(negedge clk);
  endtask

  // count SyncEvent waits: rising edges of the TS wait flag
  int n_wait_edges = 0;
  always @(posedge clk) begin
    if (ts_sync_wait && !sw_q) n_wait_edges++;
    sw_q <= ts_sync_wait;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c0, b0, w0;
  initial begin
    for (int i = 0; i < NTI; i++) fe_trig_cnt[i] = 0;
    ts_cfg = '0;
    ts_cfg.in_enable[2:0] = 3'b111;
    for (int p = 0; p < N_PART; p++) begin
      for (int k = 0; k < 5; k++) begin ts_cfg.part_sel_gtp[p][k] = 5'd29; ts_cfg.part_sel_ext[p][k] = 5'd29; end
      for (int k = 0; k < 3; k++) ts_cfg.part_sel_asy[p][k] = 4'd14;
    end
    ts_cfg.part_sel_gtp[0][0] = 5'd1;     // partition 1 looks at GTP input 1
    ts_cfg.start_delay = 16'd20;          // slots of words queued before reading
    ts_cfg.min_gap     = 8'd8;
    ts_cfg.sync_period = 16'd0;
    ts_cfg.sync_align  = 2'd0;
    td_link_en = '1;
    td_limit   = '0;
    fe_busy    = '0;
    fe_slot_mask = '1;
    for (int i = 0; i < NTI; i++)
      ti_cfg[i] = '{sync_target: 9'd300, std_en: (i != PTI), part_en: (i == PTI),
                    part_sel: 2'd0, block_size: 8'd1};
    repeat (5) @(negedge clk);
    rst = 0;

    // lookup tables: GTP 0 -> type 77; GTP 2 -> type 99 marked SyncEvent;
    // GTP 1 -> no main trigger, partition 1 type 5
    lut(0, 0, 0); lut(0, 1, 1); lut(0, 2, 0); lut(0, 4, 2);
    lut(1, 0, 0); lut(2, 0, 0);
    lut(3, 0, 0); lut(3, 1, 77); lut(3, 2, 1024 + 99);
    lut(10, 1, 5);

    // ---- latency measurement ----
    @(negedge clk) ti_meas_start = 1; @(negedge clk) ti_meas_start = 0;
    repeat (1200) @(negedge clk);
    for (int i = 0; i < NTI; i++) begin
      checks++;
      if (!ti_lat_done[i] || ti_one_way[i] < fibre_cycles(i) || ti_one_way[i] > fibre_cycles(i) + 4)
        fail($sformatf("TI %0d one-way %0d, fibre %0d", i, ti_one_way[i], fibre_cycles(i)));
      else n_lat++;
      checks++;
      if (i % NLK != 0 && ti_one_way[i] - ti_one_way[i - (i % NLK)] != fibre_cycles(i) - fibre_cycles(i - (i % NLK)))
        fail($sformatf("TI %0d: one-way difference does not follow the fibre", i));
    end

    // ---- clock re-sync, FE reset, trigger stop ----
    sync_send(SC_CLK_RESYNC);
    settle();
    checks++;
    begin
      bit same = 1;
      for (int i = 1; i < NTI; i++) if (ti_phase[i] != ti_phase[0]) same = 0;
      if (!same) fail("TI slot phases differ after re-sync"); else n_resync++;
    end
    sync_send(SC_FE_RESET);
    settle();
    checks++;
    if (n_fer_clk != 1) fail($sformatf("FE reset reached the crates in %0d clocks", n_fer_clk));
    sync_send(SC_TRIG_STOP);
    settle();

    // ---- run start and triggers ----
    @(negedge clk) run_start = 1; @(negedge clk) run_start = 0;
    wait (ts_running);
    settle();
    for (int i = 0; i < 40; i++) pulse_in(0, 20 + $urandom % 30);
    for (int i = 0; i < 8; i++) pulse_in(1, 20 + $urandom % 30);
    settle();
    checks++;
    if (n_aligned != 40) fail($sformatf("%0d aligned triggers, 40 expected", n_aligned));
    checks++;
    if (n_part != 8) fail($sformatf("%0d partition triggers, 8 expected", n_part));

    // ---- trigger rule: a second trigger 4 clocks later is refused ----
    c0 = ts_trig_count;
    @(negedge clk) gtp[0] = 1; @(negedge clk) gtp[0] = 0;
    repeat (3) @(negedge clk);
    @(negedge clk) gtp[0] = 1; @(negedge clk) gtp[0] = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (ts_trig_count - c0 != 1) fail($sformatf("trigger rule: %0d accepted of 2", ts_trig_count - c0));
    else n_rule++;

    // ---- front end BUSY throttles the TS ----
    fe_busy[NTI/2][3] = 1;
    repeat (400) @(negedge clk);     // BUSY crosses the fibre back to the TS
    c0 = ts_trig_count; b0 = ts_busy_time;
    for (int i = 0; i < 5; i++) pulse_in(0, 30);
    checks++;
    if (ts_trig_count != c0 || ts_busy_time - b0 < 150) fail("front end BUSY did not stop triggers");
    else n_busy++;
    fe_busy[NTI/2][3] = 0;
    settle();

    // ---- event limit on TD 0 ----
    td_limit[0] = 8'd3;
    ack_hold[0] = 1;
    c0 = ts_trig_count;
    for (int i = 0; i < 20; i++) pulse_in(0, 150);
    settle();
    checks++;
    if (!td_limit_busy[0][0] || ts_trig_count - c0 >= 20) fail("event limit did not hold triggers");
    else n_limit++;
    ack_hold[0] = 0;
    settle();
    checks++;
    if (td_limit_busy[0][0]) fail("event limit BUSY did not clear");
    td_limit[0] = 8'd0;

    // ---- SyncEvent: inserted by VME ----
    w0 = n_wait_edges;
    @(negedge clk) vme_sync_event = 1; @(negedge clk) vme_sync_event = 0;
    settle(); settle();
    checks++;
    if (n_wait_edges - w0 != 1 || ts_sync_wait || n_syncpend == 0) fail("inserted SyncEvent");
    else n_se_vme++;
    // ---- SyncEvent marked by the lookup table ----
    w0 = n_wait_edges;
    pulse_in(2, 10);
    settle(); settle();
    checks++;
    if (n_wait_edges - w0 != 1 || ts_sync_wait) fail("SyncEvent from the lookup table");
    else n_se_lut++;
    // ---- periodic SyncEvent ----
    ts_cfg.sync_period = 16'd4;
    w0 = n_wait_edges;
    for (int i = 0; i < 8; i++) pulse_in(0, 120);
    settle(); settle();
    checks++;
    if (n_wait_edges - w0 < 1 || ts_sync_wait) fail("periodic SyncEvent");
    else n_se_per++;
    ts_cfg.sync_period = 16'd0;

    // ---- SyncReset request from a ROC ----
    @(negedge clk) roc_srr[1] = 1; @(negedge clk) roc_srr[1] = 0;
    settle();
    c0 = ts_trig_count;
    pulse_in(0, 40);
    checks++;
    if (!ts_srr_flag || ts_trig_count != c0) fail("SyncReset request did not stop triggers");
    @(negedge clk) srr_clear = 1; @(negedge clk) srr_clear = 0;
    repeat (20) @(negedge clk);
    pulse_in(0, 40);
    checks++;
    if (ts_srr_flag || ts_trig_count != c0 + 1) fail("triggers did not resume after SyncReset clear");
    else n_srr++;

    // ---- run stop ----
    settle();
    @(negedge clk) run_stop = 1; @(negedge clk) run_stop = 0;
    wait (!ts_running);
    settle(); settle();

    // ---- end of run checks ----
    checks++;
    if (n_misaligned != 0) fail($sformatf("%0d clocks with TI triggers not aligned", n_misaligned));
    checks++;
    if (n_bad_type != 0) fail($sformatf("%0d triggers with wrong event type", n_bad_type));
    for (int i = 0; i < NTI; i++) begin
      checks++;
      if (i != PTI && (fe_trig_cnt[i] != ts_trig_count || ti_trig_num[i] != ts_trig_count))
        fail($sformatf("TI %0d: %0d triggers out, number %0d, TS accepted %0d", i, fe_trig_cnt[i], ti_trig_num[i], ts_trig_count));
      checks++;
      if (n_read[i] != fe_trig_cnt[i] || n_ack[i] != fe_trig_cnt[i])
        fail($sformatf("TI %0d: %0d records read, %0d blocks acknowledged, %0d triggers", i, n_read[i], n_ack[i], fe_trig_cnt[i]));
      checks++;
      if (ti_fifo_err[i] || ti_sync_err[i] || ti_sync_violation[i]) fail($sformatf("TI %0d error flags", i));
    end

    checks++;
    if (n_ts_ev != ts_trig_count || n_ts_ev_bad != 0 || ts_ev_ovf)
      fail($sformatf("TS event data: %0d records (%0d bad), %0d triggers", n_ts_ev, n_ts_ev_bad, ts_trig_count));
    checks++;
    if (n_ts_ev_se < 3) fail($sformatf("TS event data: %0d SyncEvent records", n_ts_ev_se));
    checks++;
    if (n_ts_pev != n_part || n_ts_pev_bad != 0 || ts_pev_ovf != '0)
      fail($sformatf("TS partition 1 data: %0d records (%0d bad), %0d partition triggers", n_ts_pev, n_ts_pev_bad, n_part));

    $display("mechanisms: latency %0d, re-sync %0d, FE reset %0d, aligned triggers %0d, partition %0d, rule %0d, BUSY %0d, event limit %0d, SyncEvent vme/lut/periodic %0d/%0d/%0d, sync pending clocks %0d, SyncReset %0d",
             n_lat, n_resync, n_fer_clk, n_aligned, n_part, n_rule, n_busy, n_limit, n_se_vme, n_se_lut, n_se_per, n_syncpend, n_srr);
    checks++; if (n_lat == 0)     fail("latency measurement never happened");
    checks++; if (n_resync == 0)  fail("clock re-sync never happened");
    checks++; if (n_fer_clk == 0) fail("FE reset never happened");
    checks++; if (n_aligned == 0) fail("no aligned trigger");
    checks++; if (n_part == 0)    fail("no partition trigger");
    checks++; if (n_rule == 0)    fail("trigger rule never applied");
    checks++; if (n_busy == 0)    fail("BUSY never throttled");
    checks++; if (n_limit == 0)   fail("event limit never reached");
    checks++; if (n_se_vme == 0 || n_se_lut == 0 || n_se_per == 0) fail("a SyncEvent kind never happened");
    checks++; if (n_srr == 0)     fail("SyncReset request never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
