// tb_sync_encoder: issues random SYNC commands (invalid codes among them)
// with each phase alignment setting and decodes the Manchester line in the
// testbench: every symbol pair must be a valid Manchester pair, each frame
// must be a '0' start bit plus the 4-bit code in order of issue, the first
// code bit must sit in the slot phase given by align, starts must be at
// least 16 clocks (64 ns) apart with at least four idle '1's between frames,
// and invalid codes must never appear.
module tb_sync_encoder;
  logic clk = 0, rst = 1;
  logic [1:0] phase = '0, align = '0;
  logic cmd_valid = 0;
  logic [3:0] cmd = '0;
  logic ready, busy;
  logic [1:0] manch;
  int checks = 0, failures = 0, frames = 0;

  sync_encoder dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) phase <= phase + 1'b1;

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  logic [3:0] sent [$];
  // line monitor
  int ones = 0, nleft = 0, last_start = -100, cyc = 0;
  logic [3:0] sh;
  logic [1:0] ph_before;
  always @(posedge clk) begin
    ph_before = phase;
    #1;
    cyc++;
    if (!rst) begin
      logic b;
      checks++;
      if (manch[1] == manch[0]) fail("Manchester violation");
      b = manch[0];
      if (nleft > 0) begin
        if (nleft == 4) begin
          checks++;
          if (ph_before != align) fail($sformatf("first code bit in phase %0d, align %0d", ph_before, align));
        end
        sh = {sh[2:0], b};
        nleft--;
        if (nleft == 0) begin
          logic [3:0] e;
          frames++;
          checks++;
          if (sent.size() == 0) fail("frame without a command");
          else begin
            e = sent.pop_front();
            if (sh != e) fail($sformatf("code %b expected %b", sh, e));
          end
        end
      end else if (b) ones++;
      else begin
        checks++;
        if (ones < 4) fail("fewer than four idle ones before start");
        if (cyc - last_start < 16) fail($sformatf("starts %0d clocks apart", cyc - last_start));
        last_start = cyc;
        nleft = 4; ones = 0;
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < 4; a++) begin
      align = 2'(a);
      for (int n = 0; n < 60; n++) begin
        logic [3:0] c;
        c = 4'($urandom);
        @(negedge clk);
        while (!ready) @(negedge clk);
        cmd_valid = 1; cmd = c;
        if (c != 4'b0000 && c != 4'b1111) sent.push_back(c);
        @(negedge clk); cmd_valid = 0;
        repeat ($urandom % 20) @(negedge clk);
      end
      while (busy) @(negedge clk);
      repeat (10) @(negedge clk);
    end
    checks++;
    if (sent.size() != 0 || frames < 150) fail($sformatf("%0d commands unsent, %0d frames", sent.size(), frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
