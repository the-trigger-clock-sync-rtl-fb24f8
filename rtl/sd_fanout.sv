// sd_fanout: Signal Distribution (SD) switch-slot board.
//
// Fans the TCS signals received from payload slot 18 (the TS in the global
// crate, the TI in a front end crate) out to payload slots 1..N_SLOT, and
// merges the status coming back from those slots into one bundle for slot 18.
// The merge is a bit-wise OR over the slots enabled in slot_mask (an empty
// or ignored slot must not hold BUSY). The fan-out is a buffer (no clock
// delay); the merged status is registered, 1 clock.
// Fan-out and BUSY merging follow the document; the slot mask and the
// register on the merged status are this design's.
module sd_fanout #(
  parameter int unsigned N_SLOT = 16,
  parameter int unsigned DOWN_W = 19,   // TCS bundle width
  parameter int unsigned UP_W   = 2     // status bundle width
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [DOWN_W-1:0]             down_in,
  output logic [N_SLOT-1:0][DOWN_W-1:0] down_out,
  input  logic [N_SLOT-1:0][UP_W-1:0]   up_in,
  input  logic [N_SLOT-1:0]             slot_mask,
  output logic [UP_W-1:0]               up_out
);
  logic [UP_W-1:0] merged;

  always_comb begin
    merged = '0;
    for (int s = 0; s < N_SLOT; s++)
      if (slot_mask[s]) merged |= up_in[s];
    for (int s = 0; s < N_SLOT; s++) down_out[s] = down_in;
  end

  always_ff @(posedge clk) begin
    if (rst) up_out <= '0;
    else     up_out <= merged;
  end
endmodule
