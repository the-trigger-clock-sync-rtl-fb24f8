// ts_trigger_control: trigger rule check and throttling in the Trigger
// Supervisor, including the SyncEvent and SyncReset-request mechanisms.
//
// Every clock it looks at the candidate triggers (GTP and external lookup
// results, a VME test trigger, a VME-inserted SyncEvent and the four sub-TS
// types) and accepts them unless triggers are inhibited. Inhibit sources:
//   - acceptance not enabled (run not started),
//   - BUSY fed back from the crates (through TD and SD),
//   - the SyncEvent wait: after a SyncEvent is sent the TS stops at once and
//     waits until BUSY has been seen asserted and then released,
//   - a latched SyncReset request (polling marker), until VME clears it,
//   - the trigger rule: at least min_gap clocks between accepted main
//     triggers, and at most one main trigger per 16 ns slot.
// Main triggers are prioritised: inserted SyncEvent, GTP, external, VME. Sub-TS
// (partition) triggers are accepted only when the framer is not holding an
// unsent partition word (part_hold) and have lower priority than main ones.
// Every sync_period-th accepted main trigger is marked as SyncEvent, keeping
// its own event type; an inserted SyncEvent has event type 0. Counters:
// accepted triggers and busy (dead) time in clocks. Outputs are
// combinational in the accepting clock.
// The mechanisms follow the document; the concrete trigger rule (minimum
// spacing), the wait rule and the priorities among main sources are this
// design's choices.
module ts_trigger_control
  import tcs_pkg::*;
#(
  parameter int unsigned NP = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [1:0]             phase,        // slot phase, 0..3
  input  logic                   enable,       // trigger acceptance enabled
  input  feedback_t              fb,           // merged BUSY / SyncReset request
  // candidates
  input  logic                   gtp_valid,
  input  logic [9:0]             gtp_etype,
  input  logic                   gtp_sync,
  input  logic                   ext_valid,
  input  logic [9:0]             ext_etype,
  input  logic                   ext_sync,
  input  logic                   vme_trig,
  input  logic [9:0]             vme_etype,
  input  logic                   vme_sync_event,
  input  logic [NP-1:0][2:0] ptype,
  input  logic                   part_hold,
  // configuration
  input  logic [7:0]             min_gap,      // trigger rule, clocks
  input  logic [15:0]            sync_period,  // 0: no periodic SyncEvent
  input  logic                   srr_clear,    // VME clears the request marker
  // results
  output trig_t                  acc,
  output logic [NP-1:0][2:0] part_acc,
  output logic                   srr_flag,     // SyncReset request marker
  output logic                   sync_wait,
  output logic [31:0]            trig_count,
  output logic [31:0]            busy_time
);
  typedef enum logic [1:0] {W_IDLE, W_SEE_BUSY, W_SEE_FREE} wait_e;
  wait_e wst;

  logic [7:0]  since;        // clocks since last accepted main trigger
  logic        slot_used;    // a main trigger was accepted in this slot
  logic [15:0] per_cnt;
  logic        inhibit, main_ok;
  trig_t       cand;

  always_comb begin
    inhibit = !enable || fb.busy || (wst != W_IDLE) || srr_flag;
    main_ok = !inhibit && (since >= min_gap) && !(slot_used && phase != 2'd0);

    cand = '0;
    if (vme_sync_event)  cand = '{valid: 1'b1, hdr: TW_VME_TRIG, etype: '0,        sync_ev: 1'b1};
    else if (gtp_valid)  cand = '{valid: 1'b1, hdr: TW_GTP,      etype: gtp_etype, sync_ev: gtp_sync};
    else if (ext_valid)  cand = '{valid: 1'b1, hdr: TW_EXT,      etype: ext_etype, sync_ev: ext_sync};
    else if (vme_trig)   cand = '{valid: 1'b1, hdr: TW_VME_TRIG, etype: vme_etype, sync_ev: 1'b0};

    acc = '0;
    if (cand.valid && main_ok) begin
      acc = cand;
      if (sync_period != '0 && per_cnt == sync_period - 1'b1) acc.sync_ev = 1'b1;
    end

    part_acc = '0;
    if (!inhibit && !part_hold) part_acc = ptype;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wst        <= W_IDLE;
      since      <= '1;
      slot_used  <= 1'b0;
      per_cnt    <= '0;
      srr_flag   <= 1'b0;
      trig_count <= '0;
      busy_time  <= '0;
    end else begin
      if (since != '1) since <= since + 1'b1;
      if (phase == 2'd3) slot_used <= 1'b0;

      if (acc.valid) begin
        since      <= 8'd1;
        slot_used  <= (phase != 2'd3);
        trig_count <= trig_count + 1'b1;
        if (sync_period != '0 && !vme_sync_event)
          per_cnt <= (per_cnt == sync_period - 1'b1) ? '0 : per_cnt + 1'b1;
      end

      case (wst)
        W_IDLE:     if (acc.valid && acc.sync_ev) wst <= W_SEE_BUSY;
        W_SEE_BUSY: if (fb.busy)  wst <= W_SEE_FREE;
        W_SEE_FREE: if (!fb.busy) wst <= W_IDLE;
        default:    wst <= W_IDLE;
      endcase

      if (fb.sync_reset_req)  srr_flag <= 1'b1;
      else if (srr_clear)     srr_flag <= 1'b0;

      if (enable && fb.busy) busy_time <= busy_time + 1'b1;
    end
  end

  assign sync_wait = (wst != W_IDLE);

  // at most one main trigger leaves per slot
  a_one_per_slot: assert property (@(posedge clk) disable iff (rst)
      acc.valid && phase != 2'd3 |=> !acc.valid || phase == 2'd0);
endmodule
