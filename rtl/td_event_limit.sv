// td_event_limit: event (block) limit for one TI link of a Trigger
// Distribution board.
//
// Counts the blocks of triggers the TI reports as sent (blk_end pulses from
// the TI status) against the readout acknowledges from the crate's ROC
// (roc_ack pulses). The difference is the number of blocks buffered in the
// front end crate; busy is asserted while it has reached the preset limit.
// limit = 1 is event locking (no second block before the first is read out);
// limit = 0 disables the check (pipeline mode, front end BUSY only). With one
// trigger per block the count is a trigger count. clr (SYNC front end reset)
// clears the count. busy is registered: 1 clock after the pulse.
// The rule follows the document; counting from the TI's status pulses and
// the counter width are this design's choices.
module td_event_limit #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             blk_end,
  input  logic             roc_ack,
  input  logic [CNT_W-1:0] limit,
  output logic [CNT_W-1:0] outstanding,
  output logic             busy
);
  logic [CNT_W-1:0] nxt;

  always_comb begin
    nxt = outstanding;
    if (blk_end && !roc_ack && outstanding != '1) nxt = outstanding + 1'b1;
    else if (roc_ack && !blk_end && outstanding != '0) nxt = outstanding - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      outstanding <= '0;
      busy        <= 1'b0;
    end else begin
      outstanding <= nxt;
      busy        <= (limit != '0) && (nxt >= limit);
    end
  end
endmodule
