// ti_latency_meter: fibre latency measurement of a Trigger Interface.
//
// On start it sends a one-clock test pulse (loop_tx) down the fourth fibre
// pair; the TD loops it back and it returns on loop_rx. A counter running
// from the clock of loop_tx measures the round trip in 4 ns clocks; the
// one-way latency is half of it (rounded up). done is set when the pulse
// came back; timeout is set if it did not within 2**CNT_W-1 clocks.
// The loop-back method and the halving follow the document; only the 4 ns
// coarse count is made here (the document refines it below 1 ns with a
// carry-chain delay line).
module ti_latency_meter #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output logic             loop_tx,
  input  logic             loop_rx,
  output logic             done,
  output logic             timeout,
  output logic [CNT_W-1:0] round_trip,
  output logic [CNT_W-1:0] one_way
);
  logic             run;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      run        <= 1'b0;
      cnt        <= '0;
      loop_tx    <= 1'b0;
      done       <= 1'b0;
      timeout    <= 1'b0;
      round_trip <= '0;
      one_way    <= '0;
    end else begin
      loop_tx <= 1'b0;
      if (start) begin
        run     <= 1'b1;
        loop_tx <= 1'b1;
        cnt     <= '0;
        done    <= 1'b0;
        timeout <= 1'b0;
      end else if (run) begin
        cnt <= cnt + 1'b1;
        if (loop_rx) begin
          run        <= 1'b0;
          done       <= 1'b1;
          round_trip <= cnt;
          one_way    <= (cnt >> 1) + CNT_W'(cnt[0]);
        end else if (cnt == '1) begin
          run     <= 1'b0;
          timeout <= 1'b1;
        end
      end
    end
  end
endmodule
