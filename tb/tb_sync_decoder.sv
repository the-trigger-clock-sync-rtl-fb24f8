// tb_sync_decoder: the testbench Manchester-encodes SYNC frames itself
// (start '0' + 4-bit code after a random number of idle '1's) and checks
// that each frame preceded by at least four '1's is decoded with the right
// code and the one action pulse of the command table, in the clock after its
// last code bit; that a '0' after fewer than four '1's starts no frame; that
// equal symbol halves are flagged as violations; and that bit_out follows
// the line one clock later.
module tb_sync_decoder;
  import tcs_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] manch = 2'b01;
  logic bit_out, violation, cmd_valid, fe_reset, trig_stop, trig_start;
  logic gtp_stat_rst, clk_resync, sysclk_resync, full_reset, invalid;
  logic [3:0] cmd;
  int checks = 0, failures = 0, decoded = 0, viols = 0;

  sync_decoder dut (.*);
  always #2 clk = ~clk;

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  // expected events, by clock number
  int exp_cmd [int];
  int cyc = 0;
  logic prev_b = 1;
  bit exp_viol = 0;

  always @(posedge clk) begin
    #1;
    cyc++;
    if (!rst) begin
      logic [7:0] act, eact;
      checks++;
      if (bit_out !== prev_b) fail("bit_out");
      if (violation !== exp_viol) fail("violation flag");
      act = {fe_reset, trig_stop, trig_start, gtp_stat_rst, clk_resync, sysclk_resync, full_reset, invalid};
      eact = '0;
      if (exp_cmd.exists(cyc)) begin
        logic [3:0] c;
        c = 4'(exp_cmd[cyc]);
        case (c)
          4'b1101: eact[7] = 1; 4'b0111: eact[6] = 1; 4'b0101: eact[5] = 1;
          4'b0100: eact[4] = 1; 4'b0011: eact[3] = 1; 4'b0010: eact[2] = 1;
          4'b0001: eact[1] = 1; 4'b0000, 4'b1111: eact[0] = 1;
          default: ;
        endcase
        if (!cmd_valid || cmd !== c) fail($sformatf("clk %0d: cmd_valid %0d cmd %b expected %b", cyc, cmd_valid, cmd, c));
        else decoded++;
      end else if (cmd_valid) fail($sformatf("clk %0d: unexpected cmd %b", cyc, cmd));
      if (act !== eact) fail($sformatf("clk %0d: actions %b expected %b", cyc, act, eact));
    end
  end

  // drive one bit for one clock (cyc counts the edge that samples it)
  task automatic send(logic b, bit viol = 0);
    @(negedge clk);
    manch = viol ? 2'b11 : {~b, b};
    @(posedge clk);
    prev_b = viol ? 1'b1 : b;
    exp_viol = viol;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 6; i++) send(1);
    for (int n = 0; n < 400; n++) begin
      int idle;
      logic [3:0] c;
      c = 4'($urandom);
      idle = 4 + $urandom % 6;
      if (n % 25 == 7) begin
        // too few ones: this '0' must not start a frame; resynchronise after
        for (int i = 0; i < 2; i++) send(1);
        send(0);
        for (int i = 0; i < 5; i++) send(1);
        continue;
      end
      for (int i = 0; i < idle; i++) send(1, (n % 13 == 3) && i == 1);
      send(0);
      for (int k = 3; k >= 0; k--) send(c[k]);
      exp_cmd[cyc + 1] = int'(c);
    end
    for (int i = 0; i < 6; i++) send(1);
    checks++;
    if (decoded < 350) fail($sformatf("only %0d frames decoded", decoded));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
