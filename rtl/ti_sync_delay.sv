// ti_sync_delay: fibre latency compensation of the SYNC line in a TI.
//
// The received (Manchester) SYNC symbols are delayed by
//   delay = target - one_way   clocks (4 ns steps, clamped to 0..MAX_DELAY-1)
// so that the fibre latency plus this delay is the same target for every TI:
// the longer the fibre, the shorter the delay inside the TI, and all TIs see
// each SYNC command in the same clock. Built as a circular buffer of
// MAX_DELAY entries; the output is registered, so the total delay through
// the block is delay + 1 clocks. While not yet filled after reset it outputs
// the idle symbol.
// The compensation rule follows the document; the buffer depth is this
// design's choice (enough for several hundred metres of fibre).
module ti_sync_delay #(
  parameter int unsigned MAX_DELAY = 512,
  parameter int unsigned DW        = 2,
  parameter logic [DW-1:0] IDLE    = 2'b01,
  parameter int unsigned AW        = $clog2(MAX_DELAY)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] target,
  input  logic [AW-1:0] one_way,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] mem [MAX_DELAY];
  logic [AW-1:0] wp, delay, rp;
  logic [AW:0]   filled;

  always_comb begin
    delay = (target > one_way) ? target - one_way : '0;
    rp    = wp - delay;
  end

  always_ff @(posedge clk) begin
    mem[wp] <= din;
    if (rst) begin
      wp     <= '0;
      filled <= '0;
      dout   <= IDLE;
    end else begin
      wp <= wp + 1'b1;
      if (filled != (AW+1)'(MAX_DELAY)) filled <= filled + 1'b1;
      if (delay == '0)                 dout <= din;
      else if (filled >= (AW+1)'(delay)) dout <= mem[rp];
      else                              dout <= IDLE;
    end
  end
endmodule
