// fibre_link: behavioural model of one optical fibre with its transceivers,
// seen from the 250 MHz logic: a fixed propagation delay of DELAY clocks.
//
// What enters on din leaves on dout DELAY clocks later. The delay line is a
// circular buffer; until it has been filled after reset the output is IDLE
// (dark fibre). About 5 ns per metre of fibre, so DELAY = ceil(5 * length /
// 4). This models a physical part (light in glass), not logic on a board; it
// lets a whole system with fibres of different lengths be simulated.
module fibre_link #(
  parameter int unsigned DELAY = 8,     // >= 1
  parameter int unsigned W     = 1,
  parameter logic [W-1:0] IDLE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (DELAY > 1) ? $clog2(DELAY) : 1;

  logic [W-1:0]  mem [DELAY];
  logic [AW-1:0] ptr;
  logic          full;

  always_ff @(posedge clk) begin
    mem[ptr] <= din;
    if (rst) begin
      ptr  <= '0;
      full <= 1'b0;
    end else begin
      if (ptr == AW'(DELAY - 1)) begin
        ptr  <= '0;
        full <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  assign dout = full ? mem[ptr] : IDLE;
endmodule
