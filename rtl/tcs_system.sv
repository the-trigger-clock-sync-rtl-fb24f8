// tcs_system: the complete trigger/clock/SYNC distribution.
//
// One Trigger Supervisor (ts_core) drives the global Signal Distribution
// board (sd_fanout), which fans the trigger link and the SYNC line out to
// N_TD Trigger Distribution boards (td_core). Each TD drives N_LINK Trigger
// Interface boards (ti_core) through optical fibres (fibre_link: trigger
// link, SYNC, loop-back pulse downstream; status and latency test pulse
// upstream). Each TI drives the SD board of its front end crate, which fans
// the trigger and the front end reset out to N_FE payload slots and merges
// their BUSY back to the TI. BUSY and SyncReset requests are merged upward
// TI -> TD -> global SD -> TS, where they throttle the triggers.
// TI number i = td * N_LINK + link. Fibre i has fibre_cycles(i) clocks of
// delay, cycling through the lengths 150 m, 50 m, 5 m and 4 m.
// Everything runs on one 250 MHz clock, as the whole system shares the TS
// clock; the clock distribution itself (drivers, PLLs) is not logic here.
// Interfaces to the ROCs and front end modules, and all configuration, are
// top-level ports. The system structure follows the document (16 TDs of 8
// TIs give the 128 front end crates it supports).
module tcs_system
  import tcs_pkg::*;
#(
  parameter int unsigned N_TD   = 16,
  parameter int unsigned N_LINK = 8,
  parameter int unsigned N_FE   = 16,
  parameter int unsigned N_TI   = N_TD * N_LINK
) (
  input  logic                         clk,
  input  logic                         rst,
  // level-one triggers
  input  logic [N_GTP-1:0]             gtp,
  input  logic [N_EXT-1:0]             ext,
  input  logic [N_ASY-1:0]             asy,
  // TS configuration and VME actions
  input  ts_cfg_t                      ts_cfg,
  input  lut_wr_t                      lut_wr,
  input  logic                         vme_trig,
  input  logic [9:0]                   vme_etype,
  input  logic                         vme_sync_event,
  input  logic                         vme_cmd_valid,
  input  logic [11:0]                  vme_cmd,
  input  logic                         run_start,
  input  logic                         run_stop,
  input  logic                         srr_clear,
  input  logic                         sync_cmd_valid,
  input  logic [3:0]                   sync_cmd,
  output logic                         sync_cmd_ready,
  output logic                         ts_running,
  output logic                         ts_srr_flag,
  output logic                         ts_sync_wait,
  output logic [31:0]                  ts_trig_count,
  output logic [31:0]                  ts_busy_time,
  // TS event data
  input  logic                         ts_ev_rd,
  output logic                         ts_ev_avail,
  output logic [94:0]                  ts_ev_data,
  output logic                         ts_ev_ovf,
  input  logic [N_PART-1:0]            ts_pev_rd,
  output logic [N_PART-1:0]            ts_pev_avail,
  output logic [N_PART-1:0][82:0]      ts_pev_data,
  output logic [N_PART-1:0]            ts_pev_ovf,
  // TD configuration
  input  logic [N_TD-1:0][N_LINK-1:0]  td_link_en,
  input  logic [N_TD-1:0][7:0]         td_limit,
  output logic [N_TD-1:0][N_LINK-1:0]  td_limit_busy,
  // TI configuration
  input  logic                         ti_meas_start,
  input  ti_cfg_t [N_TI-1:0]           ti_cfg,
  // front end crates
  input  logic [N_TI-1:0][N_FE-1:0]    fe_busy,
  input  logic [N_FE-1:0]              fe_slot_mask,
  output logic [N_TI-1:0][N_FE-1:0]    fe_trig,
  output logic [N_TI-1:0][N_FE-1:0]    fe_reset,
  output logic [N_TI-1:0][9:0]         ti_trig_etype,
  // ROCs
  input  logic [N_TI-1:0]              roc_rd,
  input  logic [N_TI-1:0]              roc_ack,
  input  logic [N_TI-1:0]              roc_srr,
  output logic [N_TI-1:0]              roc_avail,
  output logic [N_TI-1:0][93:0]        roc_data,
  output logic [N_TI-1:0]              roc_irq,
  output logic [N_TI-1:0]              roc_sync_pend,
  // monitoring
  output logic [N_TI-1:0][9:0]         ti_one_way,
  output logic [N_TI-1:0]              ti_lat_done,
  output logic [N_TI-1:0][1:0]         ti_phase,
  output logic [N_TI-1:0]              ti_fifo_err,
  output logic [N_TI-1:0]              ti_sync_err,
  output logic [N_TI-1:0]              ti_sync_violation,
  output logic [N_TI-1:0][31:0]        ti_trig_num
);
  localparam int unsigned N_GSLOT = 16;           // TD slots of the global crate
  localparam int unsigned DOWN_W  = $bits(tlink_t) + 2;
  localparam int unsigned FDW     = DOWN_W + 1;   // + loop-back pulse
  localparam int unsigned FUW     = $bits(ti_status_t) + 1;

  tlink_t     ts_tlink;
  logic [1:0] ts_sync;
  feedback_t  ts_fb;
  logic [N_GSLOT-1:0][DOWN_W-1:0] gsd_down;
  logic [N_GSLOT-1:0][1:0]        gsd_up;
  logic [N_GSLOT-1:0]             gsd_mask;

  ts_core u_ts (
    .clk, .rst, .gtp, .ext, .asy, .cfg(ts_cfg), .lut_wr,
    .vme_trig, .vme_etype, .vme_sync_event, .vme_cmd_valid, .vme_cmd,
    .run_start, .run_stop, .srr_clear, .sync_cmd_valid, .sync_cmd, .sync_cmd_ready,
    .fb(ts_fb), .tlink(ts_tlink), .sync_manch(ts_sync),
    .running(ts_running), .link_en(), .srr_flag(ts_srr_flag), .sync_wait(ts_sync_wait),
    .trig_count(ts_trig_count), .busy_time(ts_busy_time), .phase(),
    .ev_rd(ts_ev_rd), .ev_avail(ts_ev_avail), .ev_data(ts_ev_data), .ev_ovf(ts_ev_ovf),
    .pev_rd(ts_pev_rd), .pev_avail(ts_pev_avail), .pev_data(ts_pev_data), .pev_ovf(ts_pev_ovf)
  );

  always_comb
    for (int s = 0; s < N_GSLOT; s++) gsd_mask[s] = (s < N_TD);

  sd_fanout #(.N_SLOT(N_GSLOT), .DOWN_W(DOWN_W), .UP_W(2)) u_gsd (
    .clk, .rst, .down_in({ts_tlink, ts_sync}), .down_out(gsd_down),
    .up_in(gsd_up), .slot_mask(gsd_mask), .up_out(ts_fb)
  );

  for (genvar s = N_TD; s < N_GSLOT; s++) begin : g_empty
    assign gsd_up[s] = '0;
  end

  for (genvar t = 0; t < N_TD; t++) begin : g_td
    tlink_t     [N_LINK-1:0] tl;
    logic [N_LINK-1:0][1:0]  sy;
    logic [N_LINK-1:0]       lp_out, lp_in;
    ti_status_t [N_LINK-1:0] st;
    feedback_t               fb;

    td_core #(.N_LINK(N_LINK)) u_td (
      .clk, .rst,
      .tlink_in(gsd_down[t][DOWN_W-1:2]), .sync_in(gsd_down[t][1:0]), .fb_out(fb),
      .tlink_out(tl), .sync_out(sy), .loop_out(lp_out), .loop_in(lp_in),
      .status_in(st), .link_en(td_link_en[t]), .limit(td_limit[t]),
      .outstanding(), .limit_busy(td_limit_busy[t]), .sync_violation()
    );
    assign gsd_up[t] = fb;

    for (genvar l = 0; l < N_LINK; l++) begin : g_ti
      localparam int unsigned I = t * N_LINK + l;
      logic [FDW-1:0] dn_far;
      logic [FUW-1:0] up_near;
      tlink_t         ti_tl;
      logic [1:0]     ti_sy;
      logic           ti_lp_rx, ti_lp_tx, sdb;
      ti_status_t     ti_st;
      logic [N_FE-1:0][1:0] fe_down;
      logic [N_FE-1:0][0:0] fe_up;
      logic           trig, fer;

      fibre_link #(.DELAY(fibre_cycles(I)), .W(FDW), .IDLE({{$bits(tlink_t){1'b0}}, 2'b01, 1'b0})) u_fdn (
        .clk, .rst, .din({tl[l], sy[l], lp_out[l]}), .dout(dn_far)
      );
      assign {ti_tl, ti_sy, ti_lp_rx} = dn_far;

      fibre_link #(.DELAY(fibre_cycles(I)), .W(FUW), .IDLE('0)) u_fup (
        .clk, .rst, .din({ti_st, ti_lp_tx}), .dout(up_near)
      );
      assign {st[l], lp_in[l]} = up_near;

      ti_core u_ti (
        .clk, .rst, .tlink_in(ti_tl), .sync_in(ti_sy), .loop_tx(ti_lp_tx),
        .loop_rx(ti_lp_rx), .status_out(ti_st),
        .meas_start(ti_meas_start), .sync_target(ti_cfg[I].sync_target),
        .std_en(ti_cfg[I].std_en), .part_en(ti_cfg[I].part_en),
        .part_sel(ti_cfg[I].part_sel), .block_size(ti_cfg[I].block_size),
        .sd_busy(sdb), .trig_out(trig), .trig_etype(ti_trig_etype[I]), .fe_reset_out(fer),
        .roc_rd(roc_rd[I]), .roc_avail(roc_avail[I]), .roc_data(roc_data[I]),
        .roc_irq(roc_irq[I]), .sync_pend(roc_sync_pend[I]), .roc_ack(roc_ack[I]),
        .roc_srr(roc_srr[I]),
        .one_way(ti_one_way[I]), .lat_done(ti_lat_done[I]), .phase(ti_phase[I]),
        .fifo_err(ti_fifo_err[I]), .sync_err(ti_sync_err[I]),
        .sync_violation(ti_sync_violation[I]), .trig_num(ti_trig_num[I])
      );

      for (genvar k = 0; k < N_FE; k++) begin : g_fe
        assign fe_up[k] = fe_busy[I][k];
        assign fe_trig[I][k]  = fe_down[k][1];
        assign fe_reset[I][k] = fe_down[k][0];
      end

      sd_fanout #(.N_SLOT(N_FE), .DOWN_W(2), .UP_W(1)) u_fsd (
        .clk, .rst, .down_in({trig, fer}), .down_out(fe_down),
        .up_in(fe_up), .slot_mask(fe_slot_mask), .up_out(sdb)
      );
    end
  end
endmodule
