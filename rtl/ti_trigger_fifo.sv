// ti_trigger_fifo: the trigger-word FIFO that gives the serial trigger link
// a fixed latency on every TI.
//
// Every valid (non-idle) word arriving from the link is written, whatever
// the TI's slot phase. Reading is disabled at reset. The SYNC commands set
// the pointers:
//   trig_stop  - write pointer to 0, reading stops (the read pointer is
//                cleared too, so the level stays meaningful)
//   trig_start - read pointer to 0, then one word is read in every slot
//                (at tick, the first clock of the TI's 16 ns slot)
//   fe_reset   - both pointers to 0, reading stops
// Because every TI receives trig_start in the same clock (SYNC is latency
// compensated) and their slot phases are aligned, word k is read out in the
// same clock on every TI, whatever the fibre length. Reading from an empty
// FIFO sets the sticky underflow flag (the start delay was too short);
// writing to a full one sets overflow and drops the word.
// rd_valid/rd_word are registered: one clock after tick.
// The FIFO and its control by the SYNC commands follow the document; the
// depth and the error flags are this design's.
module ti_trigger_fifo
  import tcs_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  tlink_t      link,
  input  logic        tick,
  input  logic        trig_stop,
  input  logic        trig_start,
  input  logic        fe_reset,
  output logic        rd_valid,
  output logic [15:0] rd_word,
  output logic        reading,
  output logic [AW:0] level,
  output logic        underflow,
  output logic        overflow
);
  logic [15:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic        full, empty;

  always_comb begin
    level = wp - rp;
    full  = (level == (AW+1)'(DEPTH));
    empty = (wp == rp);
  end

  always_ff @(posedge clk) begin
    if (link.valid && !full) mem[wp[AW-1:0]] <= link.word;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; reading <= 1'b0;
      rd_valid <= 1'b0; rd_word <= '0;
      underflow <= 1'b0; overflow <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      if (link.valid) begin
        if (!full) wp <= wp + 1'b1;
        else       overflow <= 1'b1;
      end
      if (reading && tick) begin
        if (!empty) begin
          rd_valid <= 1'b1;
          rd_word  <= mem[rp[AW-1:0]];
          rp       <= rp + 1'b1;
        end else begin
          underflow <= 1'b1;
        end
      end
      if (fe_reset) begin
        wp <= '0; rp <= '0; reading <= 1'b0;
      end else if (trig_stop) begin
        wp <= '0; rp <= '0; reading <= 1'b0;
      end else if (trig_start) begin
        rp <= '0; reading <= 1'b1;
      end
    end
  end
endmodule
