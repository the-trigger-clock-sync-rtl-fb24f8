// ti_core: Trigger Interface (TI) FPGA, TCS interface and event assembly.
//
// Receive side, in order:
//   ti_latency_meter  - measures the fibre latency with a loop-back pulse
//   ti_sync_delay     - delays SYNC by sync_target - latency, so every TI
//                       decodes each SYNC command in the same clock
//   sync_decoder      - Manchester decode and command decode
//   slot phase        - 2-bit counter for the 62.5 MHz slot, forced to 0
//                       by the clock re-sync commands (0011, 0010), which
//                       aligns the slots of all TIs
//   ti_trigger_fifo   - fixed-latency trigger word FIFO (SYNC stop/start)
//   ti_trigger_decode - trigger re-issued with 4 ns precision
//   ti_event_builder  - event data, blocks, ROC handshake, BUSY and status
// The decoded front end reset (1101) is sent to the crate as fe_reset_out and
// clears the TI's own buffers and counters. trig_out goes to the crate SD.
// status_out is the bundle returned to the TD through the fibre.
// Structure follows the document; the slot phase counter stands in for the
// clock chip's slower-clock re-sync, and sync_target, the FIFO and event
// buffer depths are this design's choices.
module ti_core
  import tcs_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 128,
  parameter int unsigned EVT_DEPTH  = 64,
  parameter int unsigned MAX_DELAY  = 512
) (
  input  logic        clk,
  input  logic        rst,
  // fibre side
  input  tlink_t      tlink_in,
  input  logic [1:0]  sync_in,
  output logic        loop_tx,
  input  logic        loop_rx,
  output ti_status_t  status_out,
  // configuration
  input  logic        meas_start,
  input  logic [$clog2(MAX_DELAY)-1:0] sync_target,
  input  logic        std_en,
  input  logic        part_en,
  input  logic [1:0]  part_sel,
  input  logic [7:0]  block_size,
  // crate side
  input  logic        sd_busy,
  output logic        trig_out,
  output logic [9:0]  trig_etype,
  output logic        fe_reset_out,
  // ROC side
  input  logic        roc_rd,
  output logic        roc_avail,
  output logic [93:0] roc_data,
  output logic        roc_irq,
  output logic        sync_pend,
  input  logic        roc_ack,
  input  logic        roc_srr,
  // monitoring
  output logic [9:0]  one_way,
  output logic        lat_done,
  output logic [1:0]  phase,
  output logic        fifo_err,
  output logic        sync_err,
  output logic        sync_violation,
  output logic [31:0] trig_num
);
  localparam int unsigned DAW = $clog2(MAX_DELAY);

  logic [1:0]  sync_d;
  logic        fe_rst, t_stop, t_start, c_rs, s_rs;
  logic        rd_valid;
  logic [15:0] rd_word;
  logic [3:0]  tsrc;
  logic        smark, uflow, oflow, ev_ovf;

  ti_latency_meter #(.CNT_W(10)) u_lat (
    .clk, .rst, .start(meas_start), .loop_tx, .loop_rx,
    .done(lat_done), .timeout(), .round_trip(), .one_way
  );

  ti_sync_delay #(.MAX_DELAY(MAX_DELAY)) u_dly (
    .clk, .rst, .target(sync_target), .one_way(one_way[DAW-1:0]),
    .din(sync_in), .dout(sync_d)
  );

  sync_decoder u_dec (
    .clk, .rst, .manch(sync_d), .bit_out(), .violation(sync_violation),
    .cmd_valid(), .cmd(), .fe_reset(fe_rst), .trig_stop(t_stop),
    .trig_start(t_start), .gtp_stat_rst(), .clk_resync(c_rs),
    .sysclk_resync(s_rs), .full_reset(), .invalid()
  );

  always_ff @(posedge clk) begin
    if (rst)              phase <= '0;
    else if (c_rs || s_rs) phase <= '0;
    else                  phase <= phase + 1'b1;
  end

  assign fe_reset_out = fe_rst;

  ti_trigger_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .link(tlink_in), .tick(phase == 2'd0),
    .trig_stop(t_stop), .trig_start(t_start), .fe_reset(fe_rst),
    .rd_valid, .rd_word, .reading(), .level(), .underflow(uflow), .overflow(oflow)
  );

  ti_trigger_decode u_tdec (
    .clk, .rst, .phase, .rd_valid, .rd_word, .fe_reset(fe_rst),
    .trig_start(t_start), .std_en, .part_en, .part_sel,
    .trig_out, .trig_etype, .trig_src(tsrc), .sync_mark(smark),
    .cmd_valid(), .cmd(), .sync_err, .checks()
  );

  ti_event_builder #(.DEPTH(EVT_DEPTH)) u_evb (
    .clk, .rst, .fe_reset(fe_rst), .trig(trig_out), .etype(trig_etype),
    .src(tsrc), .sync_mark(smark), .block_size, .sd_busy,
    .roc_rd, .roc_avail, .roc_data, .roc_irq, .sync_pend, .roc_ack, .roc_srr,
    .trig_num, .blocks_ready(), .overflow(ev_ovf), .status(status_out)
  );

  assign fifo_err = uflow || oflow || ev_ovf;
endmodule
