// ts_trigger_input: enable and prescale of the TS level-one trigger inputs.
//
// Each of the N inputs (30 GTP, 30 front-panel synchronous, 15 front-panel
// asynchronous by default) is enabled and prescaled on its own. An input
// counts as one trigger on the clock where it rises (rising-edge detection),
// so a level held for several clocks is one trigger. A prescale value P lets
// one in every P+1 triggers through (P=0 passes all). The asynchronous
// inputs first pass a two-stage synchroniser. Output: one-clock pulses,
// registered; latency from an input edge is 2 clocks for synchronous inputs
// and 4 for asynchronous ones.
// The enable and prescale per input follow the document; edge detection,
// the synchroniser and the prescale counter width are this design's choices.
module ts_trigger_input #(
  parameter int unsigned N_SYNC  = 60,  // 30 GTP + 30 front-panel synchronous
  parameter int unsigned N_ASYNC = 15,  // front-panel asynchronous
  parameter int unsigned PS_W    = 16   // prescale counter width
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N_SYNC-1:0]             sync_in,
  input  logic [N_ASYNC-1:0]            async_in,
  input  logic [N_SYNC+N_ASYNC-1:0]     enable,
  input  logic [N_SYNC+N_ASYNC-1:0][PS_W-1:0] prescale,
  output logic [N_SYNC+N_ASYNC-1:0]     trig_out
);
  localparam int unsigned N = N_SYNC + N_ASYNC;

  logic [N_ASYNC-1:0] as_meta, as_sync;
  logic [N-1:0]       lvl, lvl_q;
  logic [N-1:0][PS_W-1:0] cnt;

  always_ff @(posedge clk) begin
    as_meta <= async_in;
    as_sync <= as_meta;
  end

  always_comb lvl = {as_sync, sync_in};

  always_ff @(posedge clk) begin
    if (rst) begin
      lvl_q    <= '1;     // no edge seen from inputs already high at reset
      cnt      <= '0;
      trig_out <= '0;
    end else begin
      lvl_q <= lvl;
      for (int i = 0; i < N; i++) begin
        trig_out[i] <= 1'b0;
        if (lvl[i] && !lvl_q[i] && enable[i]) begin
          if (cnt[i] >= prescale[i]) begin
            cnt[i]      <= '0;
            trig_out[i] <= 1'b1;
          end else begin
            cnt[i] <= cnt[i] + 1'b1;
          end
        end
      end
    end
  end
endmodule
