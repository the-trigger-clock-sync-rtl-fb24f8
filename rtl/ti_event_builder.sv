// ti_event_builder: TI event data, block bookkeeping, ROC handshake and the
// crate BUSY/status sent back to the TD.
//
// For every trigger it stores one record {trigger number, time stamp, source,
// event type} in an event buffer the ROC reads (roc_rd pops the head, shown
// on roc_data while roc_avail). Triggers are grouped in blocks of block_size;
// when a block closes, blk_end pulses in the status and the number of blocks
// ready for readout goes up; roc_irq (interrupt request / polling flag) is
// high while a block is ready. roc_ack from the ROC (one per block read)
// lowers the count and is passed on in the status.
// SyncEvent: sync_mark closes a partly filled block, raises sync_pend (the
// ROC's marker) and holds BUSY until the ROC has acknowledged every ready
// block. BUSY sent to the TD = front end BUSY from the crate SD | event buffer
// within BUSY_MARGIN of full | sync_pend. roc_srr (SyncReset request from the
// ROC) is passed on as status.sync_reset_req. fe_reset clears the buffer,
// the counters and the time stamp. status is registered.
// Record contents, block readout, acknowledge and SyncEvent BUSY follow the
// document; buffer depth, margin and record layout are this design's.
module ti_event_builder
  import tcs_pkg::*;
#(
  parameter int unsigned DEPTH       = 64,
  parameter int unsigned BUSY_MARGIN = 8,
  parameter int unsigned AW          = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fe_reset,
  input  logic        trig,
  input  logic [9:0]  etype,
  input  logic [3:0]  src,
  input  logic        sync_mark,
  input  logic [7:0]  block_size,   // 0 is treated as 1
  input  logic        sd_busy,
  // ROC side
  input  logic        roc_rd,
  output logic        roc_avail,
  output logic [93:0] roc_data,     // {trig_num[31:0], tstamp[47:0], src[3:0], etype[9:0]}
  output logic        roc_irq,
  output logic        sync_pend,
  input  logic        roc_ack,
  input  logic        roc_srr,
  output logic [31:0] trig_num,
  output logic [7:0]  blocks_ready,
  output logic        overflow,
  output ti_status_t  status
);
  logic [93:0] mem [DEPTH];
  logic [AW:0] wp, rp, used;
  logic [47:0] tstamp;
  logic [7:0]  in_blk, bsize;
  logic        close_cnt, close_sync, blk_close;

  always_comb begin
    used       = wp - rp;
    roc_avail  = (wp != rp);
    roc_data   = mem[rp[AW-1:0]];
    roc_irq    = (blocks_ready != '0);
    bsize      = (block_size == '0) ? 8'd1 : block_size;
    close_cnt  = trig && (in_blk + 1'b1 == bsize);
    close_sync = sync_mark && (in_blk != '0) && !trig;
    blk_close  = close_cnt || close_sync;
  end

  always_ff @(posedge clk) begin
    if (trig && used != (AW+1)'(DEPTH))
      mem[wp[AW-1:0]] <= {trig_num, tstamp, src, etype};
  end

  always_ff @(posedge clk) begin
    if (rst || fe_reset) begin
      wp <= '0; rp <= '0; tstamp <= '0; trig_num <= '0;
      in_blk <= '0; blocks_ready <= '0; sync_pend <= 1'b0;
      overflow <= 1'b0; status <= '0;
    end else begin
      tstamp <= tstamp + 1'b1;
      if (trig) begin
        trig_num <= trig_num + 1'b1;
        if (used != (AW+1)'(DEPTH)) wp <= wp + 1'b1;
        else                         overflow <= 1'b1;
        in_blk <= close_cnt ? '0 : in_blk + 1'b1;
      end else if (close_sync) begin
        in_blk <= '0;
      end
      if (roc_rd && roc_avail) rp <= rp + 1'b1;

      case ({blk_close, roc_ack && blocks_ready != '0})
        2'b10:   blocks_ready <= blocks_ready + 1'b1;
        2'b01:   blocks_ready <= blocks_ready - 1'b1;
        default: ;
      endcase

      if (sync_mark) sync_pend <= 1'b1;
      else if (!blk_close && (blocks_ready == '0 || (roc_ack && blocks_ready == 8'd1))) sync_pend <= 1'b0;

      status.busy           <= sd_busy || sync_pend || sync_mark
                               || (used >= (AW+1)'(DEPTH - BUSY_MARGIN));
      status.blk_end        <= blk_close;
      status.roc_ack        <= roc_ack;
      status.sync_reset_req <= roc_srr;
    end
  end
endmodule
