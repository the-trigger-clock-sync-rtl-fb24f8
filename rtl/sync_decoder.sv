// sync_decoder: SYNC line receiver used on the TD and the TI.
//
// Manchester decoding: the symbol pair {~b, b} of each clock gives bit b; a
// pair with equal halves is a code violation (violation pulse, bit taken as
// idle '1'). Framing: after at least four '1's, a '0' is a start bit and the
// next four bits are the command, MSB first. One clock after the last code
// bit, cmd_valid pulses with the code and exactly one action pulse:
//   1101 fe_reset      front end crate reset, trigger link realignment
//   0111 trig_stop     trigger stop, FIFO write counter reset
//   0101 trig_start    trigger start, FIFO read counter reset
//   0100 gtp_stat_rst  reset of the GTP status register
//   0011 clk_resync    slower clock phase re-sync
//   0010 sysclk_resync system clock re-sync (also re-syncs slower clocks)
//   0001 full_reset    full reset
//   0000, 1111         invalid (invalid pulse); other codes: only cmd_valid
// bit_out is the decoded bit stream, one clock after manch, so a TD can
// encode it again with a fixed latency.
// The code table follows the document; Manchester polarity, the violation
// handling and the pulse interface are this design's.
module sync_decoder
  import tcs_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] manch,
  output logic       bit_out,
  output logic       violation,
  output logic       cmd_valid,
  output logic [3:0] cmd,
  output logic       fe_reset,
  output logic       trig_stop,
  output logic       trig_start,
  output logic       gtp_stat_rst,
  output logic       clk_resync,
  output logic       sysclk_resync,
  output logic       full_reset,
  output logic       invalid
);
  logic       b;
  logic [2:0] ones;     // consecutive '1's, saturating at 4
  logic [2:0] nleft;    // code bits still to receive
  logic [3:0] sh;

  always_comb b = (manch[1] == manch[0]) ? 1'b1 : manch[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_out   <= 1'b1;
      violation <= 1'b0;
      ones      <= '0;
      nleft     <= '0;
      sh        <= '0;
      cmd_valid <= 1'b0;
      cmd       <= '0;
    end else begin
      bit_out   <= b;
      violation <= (manch[1] == manch[0]);
      cmd_valid <= 1'b0;
      if (nleft != '0) begin
        sh    <= {sh[2:0], b};
        nleft <= nleft - 1'b1;
        ones  <= '0;
        if (nleft == 3'd1) begin
          cmd_valid <= 1'b1;
          cmd       <= {sh[2:0], b};
        end
      end else if (b) begin
        if (ones != 3'd4) ones <= ones + 1'b1;
      end else begin
        if (ones == 3'd4) nleft <= 3'd4;   // start bit
        ones <= '0;
      end
    end
  end

  always_comb begin
    fe_reset      = cmd_valid && cmd == SC_FE_RESET;
    trig_stop     = cmd_valid && cmd == SC_TRIG_STOP;
    trig_start    = cmd_valid && cmd == SC_TRIG_START;
    gtp_stat_rst  = cmd_valid && cmd == SC_GTP_STAT_RST;
    clk_resync    = cmd_valid && cmd == SC_CLK_RESYNC;
    sysclk_resync = cmd_valid && cmd == SC_SYSCLK_RESYNC;
    full_reset    = cmd_valid && cmd == SC_FULL_RESET;
    invalid       = cmd_valid && (cmd == 4'b0000 || cmd == 4'b1111);
  end
endmodule
