// tb_ti_core: two TIs behind fibres of different lengths (D0 and D1 clocks
// each way) receive the same SYNC line and trigger link from a testbench
// trigger supervisor. Checks the TI mechanisms end to end:
//  - latency measurement by loop-back gives each TI its fibre delay;
//  - the second TI leaves reset one clock later, so the slot phases differ
//    until the clock re-sync command, after which both are the same;
//  - after trigger start both TIs issue every trigger in the same clock,
//    with the quadrant timing of the trigger word (relative spacing of
//    triggers preserved to the clock), and the right event types in order;
//  - TS timer words give no sync error; the FIFO never under/overflows;
//  - ROC handshake: every trigger (block size 1) gives blk_end, the ROC's
//    acknowledge comes back as roc_ack; a SyncEvent raises BUSY until the
//    acknowledge; SD BUSY is passed to the status.
module tb_ti_core;
  import tcs_pkg::*;
  localparam int D0 = 20, D1 = 63;
  localparam int NT = 2;
  logic clk = 0, rst = 1, rst_late = 1;   // TI 1 leaves reset one clock later
  tlink_t src_tl = '0;
  logic [1:0] src_sy = 2'b01;
  tlink_t [NT-1:0] tl_in;
  logic [NT-1:0][1:0] sy_in;
  logic [NT-1:0] loop_tx, loop_rx, trig_out, fe_reset_out, roc_avail, roc_irq, sync_pend;
  logic [NT-1:0] lat_done, fifo_err, sync_err, sync_violation;
  logic [NT-1:0] roc_rd = '0, roc_ack = '0;
  logic sd_busy = 0, meas_start = 0;
  ti_status_t [NT-1:0] status_out;
  logic [NT-1:0][9:0] trig_etype, one_way;
  logic [NT-1:0][93:0] roc_data;
  logic [NT-1:0][1:0] phase;
  logic [NT-1:0][31:0] trig_num;
  int checks = 0, failures = 0, cyc = 0;

  always #2 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  // fibres: testbench delay lines of D clocks each way
  localparam int DMAX = 128;
  tlink_t     tl_line [NT][DMAX];
  logic [1:0] sy_line [NT][DMAX];
  logic       lp_line [NT][2*DMAX];
  always @(posedge clk) for (int t = 0; t < NT; t++) begin
    for (int k = DMAX - 1; k > 0; k--) begin tl_line[t][k] <= tl_line[t][k-1]; sy_line[t][k] <= sy_line[t][k-1]; end
    for (int k = 2*DMAX - 1; k > 0; k--) lp_line[t][k] <= lp_line[t][k-1];
    tl_line[t][0] <= src_tl; sy_line[t][0] <= src_sy; lp_line[t][0] <= loop_tx[t];
  end
  initial for (int t = 0; t < NT; t++) for (int k = 0; k < 2*DMAX; k++) begin
    lp_line[t][k] = 0;
    if (k < DMAX) begin tl_line[t][k] = '0; sy_line[t][k] = 2'b01; end
  end
  for (genvar t = 0; t < NT; t++) begin : g_ti
    localparam int D = (t == 0) ? D0 : D1;
    assign tl_in[t]   = tl_line[t][D-1];
    assign sy_in[t]   = sy_line[t][D-1];
    assign loop_rx[t] = lp_line[t][2*D-1];
    ti_core #(.FIFO_DEPTH(128), .EVT_DEPTH(64), .MAX_DELAY(512)) dut (
      .clk, .rst(t == 0 ? rst : rst_late), .tlink_in(tl_in[t]), .sync_in(sy_in[t]), .loop_tx(loop_tx[t]),
      .loop_rx(loop_rx[t]), .status_out(status_out[t]), .meas_start,
      .sync_target(9'd200), .std_en(1'b1), .part_en(1'b0), .part_sel(2'd0),
      .block_size(8'd1), .sd_busy, .trig_out(trig_out[t]), .trig_etype(trig_etype[t]),
      .fe_reset_out(fe_reset_out[t]), .roc_rd(roc_rd[t]), .roc_avail(roc_avail[t]),
      .roc_data(roc_data[t]), .roc_irq(roc_irq[t]), .sync_pend(sync_pend[t]),
      .roc_ack(roc_ack[t]), .roc_srr(1'b0), .one_way(one_way[t]), .lat_done(lat_done[t]),
      .phase(phase[t]), .fifo_err(fifo_err[t]), .sync_err(sync_err[t]),
      .sync_violation(sync_violation[t]), .trig_num(trig_num[t])
    );
  end

  // testbench TS: SYNC frames and the trigger link
  task automatic send_bit(logic b);
    @(negedge clk) src_sy = {~b, b};
  endtask
  task automatic send_cmd(logic [3:0] c);
    for (int i = 0; i < 6; i++) send_bit(1);
    send_bit(0);
    for (int k = 3; k >= 0; k--) send_bit(c[k]);
    for (int i = 0; i < 6; i++) send_bit(1);
  endtask

  bit link_on = 0, trig_on = 1;
  int ts_ph = 0;
  logic [9:0] sent_types [$];
  int sent_time [$];      // clock the trigger is due at the TS
  int sent_sync = 0;
  always @(negedge clk) begin
    src_tl = '0;
    ts_ph = (ts_ph + 1) % 4;
    if (link_on && ts_ph == 0) begin
      src_tl.valid = 1;
      if (trig_on && $urandom % 3 == 0) begin
        logic [1:0] q; logic [9:0] e;
        q = 2'($urandom); e = 10'($urandom % 1000 + 1);
        src_tl.word = {TW_GTP, q, e};
        sent_types.push_back(e);
        sent_time.push_back(cyc + int'(q));   // slot start clock + quadrant
      end else if (trig_on && sent_sync < 3 && $urandom % 50 == 0) begin
        src_tl.word = {TW_CONTENT, 12'h001};
        sent_sync++;
      end else begin
        src_tl.word = {TW_SYNC_CHK, 12'(cyc >> 2)};
      end
    end
  end

  // both TIs must trigger in the same clock
  int n_out = 0, last_out = -1;
  logic [9:0] got_types [$];
  int got_cyc [$];
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if (trig_out[0] !== trig_out[1]) fail($sformatf("cyc %0d: trig_out differ %b", cyc, trig_out));
      if (trig_out[0]) begin
        checks++;
        if (trig_etype[0] !== trig_etype[1]) fail("event types differ");
        got_types.push_back(trig_etype[0]);
        got_cyc.push_back(cyc);
      end
    end
  end

  // ROC model per TI: read and acknowledge every block
  int n_blk [NT], n_ack [NT];
  for (genvar t = 0; t < NT; t++) begin : g_roc
    always @(posedge clk) begin
      if (status_out[t].blk_end) n_blk[t]++;
      if (status_out[t].roc_ack) n_ack[t]++;
    end
    initial begin
      n_blk[t] = 0; n_ack[t] = 0;
      forever begin
        @(negedge clk);
        roc_rd[t] = 0; roc_ack[t] = 0;
        if (roc_avail[t]) roc_rd[t] = 1;
        else if (roc_irq[t] && !roc_ack[t] && $urandom % 4 == 0) roc_ack[t] = 1;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int busy_seen = 0;
  always @(posedge clk) if (status_out[0].busy && sync_pend[0]) busy_seen++;

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    @(negedge clk) rst_late = 0;
    repeat (5) @(negedge clk);
    meas_start = 1; @(negedge clk) meas_start = 0;
    repeat (300) @(negedge clk);
    checks++;
    if (!lat_done[0] || !lat_done[1] || one_way[0] != D0 || one_way[1] != D1)
      fail($sformatf("latency %0d %0d expected %0d %0d", one_way[0], one_way[1], D0, D1));
    checks++;
    if (phase[0] == phase[1]) fail("slot phases already aligned before re-sync");
    send_cmd(SC_CLK_RESYNC);
    repeat (300) @(negedge clk);
    checks++;
    if (phase[0] !== phase[1]) fail("slot phases not aligned");
    send_cmd(SC_FE_RESET);
    send_cmd(SC_TRIG_STOP);
    repeat (300) @(negedge clk);
    link_on = 1;
    repeat (4 * 20) @(negedge clk);
    send_cmd(SC_TRIG_START);
    repeat (8000) @(negedge clk);
    trig_on = 0;      // drain: timer words only, as the TS does before stop
    repeat (4 * 80 + 400) @(negedge clk);
    send_cmd(SC_TRIG_STOP);
    repeat (300) @(negedge clk);
    link_on = 0;
    // compare what came out with what was sent
    checks++;
    if (got_types.size() != sent_types.size()) fail($sformatf("%0d triggers out, %0d sent", got_types.size(), sent_types.size()));
    for (int i = 0; i < got_types.size() && i < sent_types.size(); i++) begin
      checks++;
      if (got_types[i] !== sent_types[i]) fail($sformatf("trigger %0d type %h expected %h", i, got_types[i], sent_types[i]));
      if (i > 0) begin
        checks++;
        // fixed latency: output spacing equals the (slot, quadrant) spacing
        if (got_cyc[i] - got_cyc[i-1] != sent_time[i] - sent_time[i-1])
          fail($sformatf("trigger %0d spacing %0d expected %0d", i, got_cyc[i] - got_cyc[i-1], sent_time[i] - sent_time[i-1]));
      end
    end
    checks++;
    if (fifo_err != 0 || sync_err != 0 || sync_violation != 0) fail($sformatf("errors fifo %b sync %b viol %b", fifo_err, sync_err, sync_violation));
    checks++;
    if (n_blk[0] != sent_types.size() || n_blk[1] != sent_types.size()) fail($sformatf("blk_end %0d/%0d of %0d", n_blk[0], n_blk[1], sent_types.size()));
    checks++;
    if (n_ack[0] != n_blk[0] || n_ack[1] != n_blk[1]) fail("acknowledges not passed on");
    checks++;
    if (sent_sync == 0 || busy_seen == 0) fail("SyncEvent BUSY never seen");
    sd_busy = 1; repeat (3) @(negedge clk);
    checks++;
    if (!status_out[0].busy || !status_out[1].busy) fail("SD BUSY not in status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
