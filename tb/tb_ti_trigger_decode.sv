// tb_ti_trigger_decode: presents one random word per slot, one clock after
// the tick, as the trigger FIFO does. A model predicts for each trigger word
// (GTP, external, VME, partition of the selected partition) a trig_out pulse
// 4 + quadrant clocks after the word, with its event type and source, and
// checks that no other pulse appears; disabled word classes must give none.
// It checks sync_mark for content words, cmd_valid for command words, and
// that consistent TS timer words leave sync_err clear while a wrong one
// sets it.
module tb_ti_trigger_decode;
  import tcs_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] phase = '0;
  logic rd_valid = 0, fe_reset = 0, trig_start = 0, std_en = 1, part_en = 1;
  logic [15:0] rd_word = '0;
  logic [1:0] part_sel = 2'd2;
  logic trig_out, sync_mark, cmd_valid, sync_err;
  logic [9:0] trig_etype;
  logic [3:0] trig_src;
  logic [11:0] cmd;
  logic [15:0] checks_o;
  int checks = 0, failures = 0, n_trig = 0, n_part = 0, n_mark = 0, n_cmd = 0;
  int cyc = 0;

  ti_trigger_decode dut (.clk, .rst, .phase, .rd_valid, .rd_word, .fe_reset,
    .trig_start, .std_en, .part_en, .part_sel, .trig_out, .trig_etype, .trig_src,
    .sync_mark, .cmd_valid, .cmd, .sync_err, .checks(checks_o));
  always #2 clk = ~clk;
  always @(posedge clk) begin phase <= phase + 1'b1; cyc++; end

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  typedef struct { logic [9:0] et; logic [3:0] src; } ev_t;
  ev_t exp_trig [int];
  bit exp_mark [int];
  bit exp_cmd [int];

  // output checker, at the negedge of every clock
  always @(negedge clk) if (!rst) begin
    checks++;
    if (exp_trig.exists(cyc)) begin
      if (!trig_out || trig_etype !== exp_trig[cyc].et || trig_src !== exp_trig[cyc].src)
        fail($sformatf("cyc %0d: trig %0d type %h src %h expected %h %h", cyc, trig_out,
             trig_etype, trig_src, exp_trig[cyc].et, exp_trig[cyc].src));
      else n_trig++;
    end else if (trig_out) fail($sformatf("cyc %0d: unexpected trigger", cyc));
    if (sync_mark !== exp_mark.exists(cyc)) fail($sformatf("cyc %0d: sync_mark", cyc));
    if (cmd_valid !== exp_cmd.exists(cyc)) fail($sformatf("cyc %0d: cmd_valid", cyc));
    if (sync_mark) n_mark++;
    if (cmd_valid) n_cmd++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    // trig_start clears the timer offset
    @(negedge clk) trig_start = 1;
    @(negedge clk) trig_start = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] w;
      logic [3:0] h;
      if (n == 1500) begin std_en = 0; part_sel = 2'd0; end
      if (n == 2200) begin std_en = 1; part_en = 0; end
      while (phase != 2'd1) @(negedge clk);
      case ($urandom % 8)
        0: h = TW_GTP; 1: h = TW_EXT; 2: h = TW_VME_TRIG; 3: h = TW_PART;
        4: h = TW_CONTENT; 5: h = TW_VME_CMD; default: h = TW_SYNC_CHK;
      endcase
      w = {h, 12'($urandom)};
      if (h == TW_SYNC_CHK) w[11:0] = 12'(((cyc + 1) >> 2) + 77);
      rd_valid = 1; rd_word = w;
      if ((h == TW_GTP || h == TW_EXT || h == TW_VME_TRIG) && std_en)
        exp_trig[cyc + 4 + int'(w[11:10])] = '{w[9:0], h};
      if (h == TW_PART && part_en && w[3*part_sel +: 3] != 0) begin
        exp_trig[cyc + 4] = '{10'(w[3*part_sel +: 3]), h};
        n_part++;
      end
      if (h == TW_CONTENT && w[0]) exp_mark[cyc + 1] = 1;
      if (h == TW_VME_CMD) exp_cmd[cyc + 1] = 1;
      @(negedge clk);
      rd_valid = 0;
    end
    repeat (12) @(negedge clk);
    checks++;
    if (sync_err) fail("sync_err with consistent timer words");
    if (checks_o < 100) fail("too few timer checks");
    // a wrong timer word
    while (phase != 2'd1) @(negedge clk);
    rd_valid = 1; rd_word = {TW_SYNC_CHK, 12'(((cyc + 1) >> 2) + 78)};
    @(negedge clk) rd_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!sync_err) fail("wrong timer word not detected");
    checks++;
    if (n_trig < 800 || n_part < 50 || n_mark < 50 || n_cmd < 100) fail("coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
