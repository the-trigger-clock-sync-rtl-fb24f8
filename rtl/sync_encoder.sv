// sync_encoder: SYNC line transmitter of the Trigger Supervisor.
//
// A SYNC command is a start bit '0' followed by the 4-bit code, MSB first,
// sent at one bit per 250 MHz clock; the line rests at '1'. The first code
// bit is sent in the clock where the 62.5 MHz slot phase equals align, so
// commands are phase locked to the trigger-word clock (receivers use that to
// align their slower clocks). Two command starts are at least 16 clocks
// (64 ns) apart, which always leaves at least four idle '1's between
// commands. The codes 0000 and 1111 are invalid and are never sent.
// The bit stream is Manchester encoded for the AC-coupled optics: each bit b
// becomes the symbol pair {~b, b} (first half in manch[1]), i.e. two line
// symbols per clock for a double-data-rate output.
// Interface: cmd_valid/cmd accepted when ready; manch is registered. The
// first code bit leaves 1 clock after the clock with phase == align.
// Frame format, phase lock, 64 ns spacing and Manchester coding follow the
// document; the symbol polarity and the handshake are this design's.
module sync_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] phase,
  input  logic [1:0] align,     // slot phase carrying the first code bit
  input  logic       cmd_valid,
  input  logic [3:0] cmd,
  output logic       ready,
  output logic       busy,      // a command is pending or being sent
  output logic [1:0] manch
);
  logic       pend;
  logic [3:0] pend_cmd;
  logic [4:0] shreg;     // start bit + code, sent from bit 4
  logic [2:0] nbits;     // bits left to send
  logic [3:0] gap;       // clocks until another start is allowed
  logic       bit_n, start_now;

  always_comb begin
    start_now = (nbits == '0) && pend && (gap == '0) && (phase == align - 2'd1);
    if (nbits != '0)   bit_n = shreg[4];
    else if (start_now) bit_n = 1'b0;
    else               bit_n = 1'b1;
  end

  assign ready = !pend;
  assign busy  = pend || (nbits != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      pend     <= 1'b0;
      pend_cmd <= '0;
      shreg    <= '1;
      nbits    <= '0;
      gap      <= 4'd15;   // idle '1's after reset before any start
      manch    <= 2'b01;   // idle '1'
    end else begin
      if (cmd_valid && !pend && cmd != 4'b0000 && cmd != 4'b1111) begin
        pend     <= 1'b1;
        pend_cmd <= cmd;
      end
      if (gap != '0) gap <= gap - 1'b1;

      if (nbits != '0) begin
        shreg <= {shreg[3:0], 1'b1};
        nbits <= nbits - 1'b1;
      end else if (start_now) begin
        // start bit now, first code bit in the clock with phase == align
        shreg <= {pend_cmd, 1'b1};
        nbits <= 3'd4;
        gap   <= 4'd15;
        pend  <= 1'b0;
      end
      manch <= {~bit_n, bit_n};
    end
  end
endmodule
