// td_core: Trigger Distribution (TD) board logic.
//
// Downstream, it fans the TCS out to N_LINK TI links: the trigger link word
// is re-sampled (one register, standing in for the clock and data recovery
// part; the word itself is not decoded) and the SYNC is Manchester decoded
// and encoded again bit by bit, so its latency stays fixed. The decoded SYNC
// is also used locally: a front end reset clears the event limit counters.
// The latency test pulse from each TI is looped straight back.
// Upstream, it receives each TI's status bundle, applies the event limit per
// link (td_event_limit) and merges BUSY and SyncReset requests of the enabled
// links into one feedback bundle for the SD, registered.
// Latency: trigger link 1 clock, SYNC 2 clocks, status to feedback 1 clock
// (2 clocks through the event limit counter).
// Fan-out, SYNC re-encoding, status merging and event limit follow the
// document; the link enable mask is this design's.
module td_core
  import tcs_pkg::*;
#(
  parameter int unsigned N_LINK = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  // from SD
  input  tlink_t                   tlink_in,
  input  logic [1:0]               sync_in,
  output feedback_t                fb_out,
  // to/from the TI links (through fibres)
  output tlink_t     [N_LINK-1:0]  tlink_out,
  output logic [N_LINK-1:0][1:0]   sync_out,
  output logic [N_LINK-1:0]        loop_out,
  input  logic [N_LINK-1:0]        loop_in,
  input  ti_status_t [N_LINK-1:0]  status_in,
  // configuration and monitoring
  input  logic [N_LINK-1:0]        link_en,
  input  logic [7:0]               limit,
  output logic [N_LINK-1:0][7:0]   outstanding,
  output logic [N_LINK-1:0]        limit_busy,
  output logic                     sync_violation
);
  tlink_t     tl_q;
  logic [1:0] enc_q;
  logic       dbit, fe_rst;
  feedback_t  fb_n;

  sync_decoder u_dec (
    .clk, .rst, .manch(sync_in), .bit_out(dbit), .violation(sync_violation),
    .cmd_valid(), .cmd(), .fe_reset(fe_rst), .trig_stop(), .trig_start(),
    .gtp_stat_rst(), .clk_resync(), .sysclk_resync(), .full_reset(), .invalid()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      tl_q  <= '0;
      enc_q <= 2'b01;
    end else begin
      tl_q  <= tlink_in;
      enc_q <= {~dbit, dbit};
    end
  end

  for (genvar l = 0; l < N_LINK; l++) begin : g_link
    assign tlink_out[l] = tl_q;
    assign sync_out[l]  = enc_q;
    assign loop_out[l]  = loop_in[l];

    td_event_limit #(.CNT_W(8)) u_lim (
      .clk, .rst, .clr(fe_rst),
      .blk_end(status_in[l].blk_end && link_en[l]),
      .roc_ack(status_in[l].roc_ack && link_en[l]),
      .limit, .outstanding(outstanding[l]), .busy(limit_busy[l])
    );
  end

  always_comb begin
    fb_n = '0;
    for (int l = 0; l < N_LINK; l++)
      if (link_en[l]) begin
        fb_n.busy           |= status_in[l].busy | limit_busy[l];
        fb_n.sync_reset_req |= status_in[l].sync_reset_req;
      end
  end

  always_ff @(posedge clk) begin
    if (rst) fb_out <= '0;
    else     fb_out <= fb_n;
  end
endmodule
