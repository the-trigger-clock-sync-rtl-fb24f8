// tb_ts_trigger_word: random accepted triggers (with random quadrant),
// sub-TS types, VME commands and SyncEvent flags; a slot-level reference
// model predicts the word of every slot: trigger word with quadrant and
// type, then the content word after a SyncEvent, then a partition word
// (held while a trigger word takes the slot), then a command word, else the
// TS timer word. Checks that valid is high exactly in the first clock of
// every slot while the link is enabled, and only idle words when disabled.
module tb_ts_trigger_word;
  import tcs_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] phase = '0;
  logic link_en = 0, cmd_valid = 0, part_hold;
  trig_t acc = '0;
  logic [3:0][2:0] part_acc = '0;
  logic [11:0] cmd = '0;
  logic [13:0] ts_time = '0;
  tlink_t link;
  int checks = 0, failures = 0;
  int n_trig = 0, n_part = 0, n_cont = 0, n_cmd = 0, n_tim = 0, n_held = 0;

  ts_trigger_word #(.NP(4)) dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) begin phase <= phase + 1'b1; ts_time <= ts_time + 1'b1; end

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  // reference model state
  trig_t m_main; logic [1:0] m_quad; logic [11:0] m_part; bit m_cont, m_cmdp, m_held;
  logic [11:0] m_cmd;
  logic [15:0] exp_word; bit exp_valid;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_main = '0; m_part = '0; m_cont = 0; m_cmdp = 0; m_held = 0; exp_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (phase != 2'd0) @(negedge clk);
    for (int c = 0; c < 12000; c++) begin
      // the word chosen in the previous slot is visible now (phase 0)
      if (phase == 2'd0) begin
        checks++;
        if (link.valid !== exp_valid || (exp_valid && link.word !== exp_word))
          fail($sformatf("clk %0d: got %0d %h expected %0d %h", c, link.valid, link.word, exp_valid, exp_word));
      end else begin
        checks++;
        if (link.valid) fail("valid outside the first clock of a slot");
      end
      if (c == 9000) link_en = 0;
      if (c == 10000) link_en = 1;
      if (c == 20) link_en = 1;
      // stimulus for this clock
      acc = '0;
      if ($urandom % 6 == 0) begin
        acc.valid = 1;
        acc.hdr = ($urandom % 2) ? TW_GTP : TW_EXT;
        acc.etype = 10'($urandom);
        acc.sync_ev = ($urandom % 8 == 0);
      end
      part_acc = '0;
      if (!part_hold && $urandom % 10 == 0) part_acc[$urandom % 4] = 3'($urandom % 7 + 1);
      cmd_valid = ($urandom % 40 == 0);
      cmd = 12'($urandom);
      // reference model, this clock
      if (acc.valid && !m_main.valid) begin m_main = acc; m_quad = phase; end
      for (int p = 0; p < 4; p++) if (m_part[3*p +: 3] == 0) m_part[3*p +: 3] = part_acc[p];
      checks++;
      if (part_hold !== m_held) fail("part_hold");
      if (cmd_valid) begin m_cmdp = 1; m_cmd = cmd; end
      if (phase == 2'd3) begin
        exp_valid = link_en;
        if (!link_en) begin
          m_part = '0; m_cont = 0; m_cmdp = 0; m_held = 0;
        end else if (m_main.valid) begin
          exp_word = {m_main.hdr, m_quad, m_main.etype}; n_trig++;
          m_cont = m_main.sync_ev;
          m_held = (m_part != 0); n_held += m_held;
        end else if (m_cont) begin
          exp_word = {TW_CONTENT, 12'h001}; m_cont = 0; n_cont++;
        end else if (m_part != 0) begin
          exp_word = {TW_PART, m_part}; m_part = '0; m_held = 0; n_part++;
        end else if (m_cmdp) begin
          exp_word = {TW_VME_CMD, m_cmd}; m_cmdp = 0; n_cmd++;
        end else begin
          exp_word = {TW_SYNC_CHK, ts_time[13:2]}; n_tim++;
        end
        m_main = '0;
      end
      @(negedge clk);
    end
    checks++;
    if (n_trig < 500 || n_part < 100 || n_cont < 50 || n_cmd < 20 || n_tim < 50 || n_held < 20)
      fail($sformatf("coverage %0d %0d %0d %0d %0d %0d", n_trig, n_part, n_cont, n_cmd, n_tim, n_held));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
