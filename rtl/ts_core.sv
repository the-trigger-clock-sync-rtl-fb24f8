// ts_core: Trigger Supervisor (TS) FPGA logic.
//
// Trigger path (250 MHz):
//   ts_trigger_input  - enable/prescale of 30 GTP, 30 synchronous and 15
//                       asynchronous level-one inputs
//   ts_event_type x2  - two-level lookup tables: GTP inputs -> GTP major
//                       trigger; external + asynchronous inputs -> external
//                       major trigger; each gives a 10-bit event type
//   ts_partition      - four sub-TS with 3-bit event types
//   ts_trigger_control- rule check, throttling, SyncEvent, SyncReset request
//   ts_trigger_word   - one 16-bit word per 16 ns slot onto the trigger link
// SYNC path: sync_encoder, fed by the run sequencer and by VME commands
// (sync_cmd_valid/sync_cmd, taken when sync_cmd_ready).
// Run sequencer: run_start switches the trigger link from idle to data words
// (trigger or timer words in every slot); after start_delay slots it sends
// SYNC "trigger start" (0101) and then enables trigger acceptance. run_stop
// disables acceptance, waits start_delay slots for the words in flight to be
// used, sends SYNC "trigger stop" (0111) and returns the link to idle.
// The TS timer (in the timer words) and the TS event data (ts_event_data:
// one record per accepted trigger, and per sub-TS trigger, read through
// ev_rd / pev_rd) are cleared when a front end reset SYNC command (1101) is
// sent. The slot phase is a free-running 2-bit counter.
// Structure and sequence follow the document; table organisation, priorities
// and the drain wait before trigger stop are this design's choices.
module ts_core
  import tcs_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [N_GTP-1:0]   gtp,
  input  logic [N_EXT-1:0]   ext,
  input  logic [N_ASY-1:0]   asy,
  input  ts_cfg_t            cfg,
  input  lut_wr_t            lut_wr,
  // VME actions
  input  logic               vme_trig,
  input  logic [9:0]         vme_etype,
  input  logic               vme_sync_event,
  input  logic               vme_cmd_valid,
  input  logic [11:0]        vme_cmd,
  input  logic               run_start,
  input  logic               run_stop,
  input  logic               srr_clear,
  input  logic               sync_cmd_valid,
  input  logic [3:0]         sync_cmd,
  output logic               sync_cmd_ready,
  // feedback from the crates
  input  feedback_t          fb,
  // TCS outputs
  output tlink_t             tlink,
  output logic [1:0]         sync_manch,
  // status
  output logic               running,
  output logic               link_en,
  output logic               srr_flag,
  output logic               sync_wait,
  output logic [31:0]        trig_count,
  output logic [31:0]        busy_time,
  output logic [1:0]         phase,
  // TS event data (main stream and one stream per sub-TS)
  input  logic               ev_rd,
  output logic               ev_avail,
  output logic [94:0]        ev_data,
  output logic               ev_ovf,
  input  logic [N_PART-1:0]  pev_rd,
  output logic [N_PART-1:0]  pev_avail,
  output logic [N_PART-1:0][82:0] pev_data,
  output logic [N_PART-1:0]  pev_ovf
);
  typedef enum logic [2:0] {S_IDLE, S_DELAY, S_START, S_RUN, S_DRAIN, S_STOP} run_e;
  run_e        rs;
  logic [15:0] dcnt;
  logic [47:0] ts_time;

  logic [N_TRIG-1:0] tin;
  logic        g_v, g_s, e_v, e_s;
  logic [9:0]  g_t, e_t;
  logic [N_PART-1:0][2:0] ptype, part_acc;
  logic        part_hold;
  trig_t       acc;
  logic        enc_ready, enc_valid;
  logic [3:0]  enc_cmd;
  logic        seq_req;
  sync_cmd_e   seq_cmd;

  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + 1'b1;
  end

  ts_trigger_input #(.N_SYNC(N_GTP + N_EXT), .N_ASYNC(N_ASY), .PS_W(16)) u_in (
    .clk, .rst, .sync_in({ext, gtp}), .async_in(asy),
    .enable(cfg.in_enable), .prescale(cfg.in_prescale), .trig_out(tin)
  );

  ts_event_type #(.N_IN(N_GTP), .GROUP_W(10), .CODE_W(4), .TYPE_W(10)) u_gtp (
    .clk, .rst, .trig_in(tin[N_GTP-1:0]),
    .wr_en(lut_wr.en && lut_wr.tbl <= 4'd3), .wr_sel(lut_wr.tbl[1:0]),
    .wr_addr(lut_wr.addr[11:0]), .wr_data(lut_wr.data),
    .valid(g_v), .etype(g_t), .sync_ev(g_s)
  );

  logic [3:0] ext_sel;
  assign ext_sel = lut_wr.tbl - 4'd4;

  ts_event_type #(.N_IN(N_EXT + N_ASY), .GROUP_W(9), .CODE_W(3), .TYPE_W(10)) u_ext (
    .clk, .rst, .trig_in(tin[N_TRIG-1:N_GTP]),
    .wr_en(lut_wr.en && lut_wr.tbl >= 4'd4 && lut_wr.tbl <= 4'd9),
    .wr_sel(ext_sel[2:0]), .wr_addr(lut_wr.addr), .wr_data(lut_wr.data),
    .valid(e_v), .etype(e_t), .sync_ev(e_s)
  );

  logic [3:0] part_idx;
  assign part_idx = lut_wr.tbl - 4'd10;

  ts_partition #(.N_PART(N_PART), .N_GTP(N_GTP), .N_EXT(N_EXT), .N_ASY(N_ASY)) u_part (
    .clk, .rst,
    .gtp(tin[N_GTP-1:0]), .ext(tin[N_GTP+N_EXT-1:N_GTP]), .asy(tin[N_TRIG-1:N_GTP+N_EXT]),
    .sel_gtp(cfg.part_sel_gtp), .sel_ext(cfg.part_sel_ext), .sel_asy(cfg.part_sel_asy),
    .wr_en(lut_wr.en && lut_wr.tbl >= 4'd10), .wr_part(part_idx[1:0]),
    .wr_addr(lut_wr.addr[12:0]), .wr_data(lut_wr.data[2:0]), .ptype
  );

  ts_trigger_control #(.NP(N_PART)) u_ctl (
    .clk, .rst, .phase, .enable(running), .fb,
    .gtp_valid(g_v), .gtp_etype(g_t), .gtp_sync(g_s),
    .ext_valid(e_v), .ext_etype(e_t), .ext_sync(e_s),
    .vme_trig, .vme_etype, .vme_sync_event(vme_sync_event && running), .ptype, .part_hold,
    .min_gap(cfg.min_gap), .sync_period(cfg.sync_period), .srr_clear,
    .acc, .part_acc, .srr_flag, .sync_wait, .trig_count, .busy_time
  );

  ts_trigger_word #(.NP(N_PART)) u_word (
    .clk, .rst, .phase, .link_en, .acc, .part_acc,
    .cmd_valid(vme_cmd_valid), .cmd(vme_cmd), .ts_time(ts_time[13:0]),
    .part_hold, .link(tlink)
  );

  // SYNC command source: run sequencer first, then VME
  always_comb begin
    seq_req = (rs == S_START) || (rs == S_STOP);
    seq_cmd = (rs == S_START) ? SC_TRIG_START : SC_TRIG_STOP;
    enc_valid      = seq_req || sync_cmd_valid;
    enc_cmd        = seq_req ? seq_cmd : sync_cmd;
    sync_cmd_ready = enc_ready && !seq_req;
  end

  ts_event_data #(.NP(N_PART)) u_evd (
    .clk, .rst, .clr(enc_ready && enc_valid && enc_cmd == SC_FE_RESET),
    .ts_time, .acc, .part_acc,
    .rd(ev_rd), .avail(ev_avail), .data(ev_data), .ovf(ev_ovf),
    .prd(pev_rd), .pavail(pev_avail), .pdata(pev_data), .povf(pev_ovf)
  );

  sync_encoder u_enc (
    .clk, .rst, .phase, .align(cfg.sync_align), .cmd_valid(enc_valid),
    .cmd(enc_cmd), .ready(enc_ready), .busy(), .manch(sync_manch)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rs      <= S_IDLE;
      dcnt    <= '0;
      running <= 1'b0;
      link_en <= 1'b0;
      ts_time <= '0;
    end else begin
      ts_time <= ts_time + 1'b1;
      if (enc_ready && enc_valid && enc_cmd == SC_FE_RESET) ts_time <= '0;
      case (rs)
        S_IDLE:  if (run_start) begin
                   link_en <= 1'b1;
                   dcnt    <= cfg.start_delay;
                   rs      <= S_DELAY;
                 end
        S_DELAY: if (phase == 2'd3) begin
                   if (dcnt == '0) rs <= S_START;
                   else            dcnt <= dcnt - 1'b1;
                 end
        S_START: if (enc_ready) begin
                   running <= 1'b1;
                   rs      <= S_RUN;
                 end
        S_RUN:   if (run_stop) begin
                   running <= 1'b0;
                   dcnt    <= cfg.start_delay;
                   rs      <= S_DRAIN;
                 end
        S_DRAIN: if (phase == 2'd3) begin
                   if (dcnt == '0) rs <= S_STOP;
                   else            dcnt <= dcnt - 1'b1;
                 end
        S_STOP:  if (enc_ready) begin
                   link_en <= 1'b0;
                   rs      <= S_IDLE;
                 end
        default: rs <= S_IDLE;
      endcase
    end
  end
endmodule
