// tb_ts_trigger_input: random pulse trains on all 75 inputs with random
// enables and prescales; a reference model counts rising edges per input and
// predicts which edges pass. Checks every output bit every clock, including
// the extra two-clock delay of the asynchronous inputs.
module tb_ts_trigger_input;
  localparam int NS = 60, NA = 15, N = NS + NA;
  logic clk = 0, rst = 1;
  logic [NS-1:0] sync_in = '0;
  logic [NA-1:0] async_in = '0;
  logic [N-1:0] enable;
  logic [N-1:0][15:0] prescale;
  logic [N-1:0] trig_out;
  int checks = 0, failures = 0, passed = 0;

  ts_trigger_input #(.N_SYNC(NS), .N_ASYNC(NA), .PS_W(16)) dut (.*);
  always #2 clk = ~clk;

  // reference: level history and counters
  logic [N-1:0] lvl, lvl_q, exp_q;
  logic [NA-1:0] a1, a2;
  int cnt [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      enable[i]   = (i % 7) != 3;
      prescale[i] = 16'(i % 4);
      cnt[i] = 0;
    end
    lvl_q = '1; exp_q = '0; a1 = '0; a2 = '0;
    repeat (3) @(posedge clk);
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      rst = 0;
      for (int i = 0; i < NS; i++) sync_in[i]  = ($urandom % 3) == 0;
      for (int i = 0; i < NA; i++) async_in[i] = ($urandom % 3) == 0;
      @(posedge clk);
      // model the clock edge
      lvl = {a2, sync_in};
      a2 = a1; a1 = async_in;
      exp_q = '0;
      for (int i = 0; i < N; i++)
        if (lvl[i] && !lvl_q[i] && enable[i]) begin
          if (cnt[i] >= int'(prescale[i])) begin cnt[i] = 0; exp_q[i] = 1; end
          else cnt[i]++;
        end
      lvl_q = lvl;
      #1;
      checks++;
      if (trig_out !== exp_q) begin
        failures++;
        if (failures < 5) $display("FAIL clk %0d: got %h exp %h", c, trig_out, exp_q);
      end
      passed += $countones(exp_q);
    end
    checks++;
    if (passed < 1000) begin failures++; $display("FAIL too few triggers passed: %0d", passed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
