// tb_ti_event_builder: random triggers with a block size of 4 and a ROC model
// that reads every record when an interrupt is pending and acknowledges each
// block. Checks: record contents (consecutive trigger numbers, time stamps
// that differ by the clocks between triggers, type and source), blocks closed
// and reported with blk_end, the interrupt, roc_ack passed to the status,
// BUSY when the buffer comes within the margin of full, BUSY from the crate
// SD, and the SyncEvent sequence: a sync_mark closes a partial block, raises
// sync_pend and BUSY, which fall when the ROC has acknowledged.
module tb_ti_event_builder;
  import tcs_pkg::*;
  localparam int DEPTH = 64, MARGIN = 8;
  logic clk = 0, rst = 1, fe_reset = 0, trig = 0, sync_mark = 0, sd_busy = 0;
  logic [9:0] etype = '0;
  logic [3:0] src = '0;
  logic [7:0] block_size = 8'd4, blocks_ready;
  logic roc_rd = 0, roc_avail, roc_irq, sync_pend, roc_ack = 0, roc_srr = 0, overflow;
  logic [93:0] roc_data;
  logic [31:0] trig_num;
  ti_status_t status;
  int checks = 0, failures = 0, cyc = 0;
  int n_blk = 0, n_ack = 0, n_busy_full = 0, n_trig = 0;

  ti_event_builder #(.DEPTH(DEPTH), .BUSY_MARGIN(MARGIN)) dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  typedef struct { int cyc; logic [9:0] et; logic [3:0] src; } rec_t;
  rec_t q [$];
  int last_num = -1, last_cyc = 0;
  logic [47:0] last_ts;
  always @(posedge clk) if (!rst) begin
    if (status.blk_end) n_blk++;
    if (status.roc_ack) n_ack++;
  end

  task automatic do_trig(logic [9:0] e, logic [3:0] s);
    @(negedge clk);
    trig = 1; etype = e; src = s;
    q.push_back('{cyc, e, s});
    n_trig++;
    @(negedge clk) trig = 0;
  endtask

  // ROC: read all records, check them, then acknowledge each ready block
  task automatic roc_readout();
    while (roc_avail) begin
      rec_t r;
      logic [31:0] num;
      logic [47:0] ts;
      @(negedge clk);
      r = q.pop_front();
      {num, ts} = roc_data[93:14];
      checks++;
      if (int'(num) != last_num + 1 || roc_data[9:0] !== r.et || roc_data[13:10] !== r.src)
        fail($sformatf("record %0d: num %0d type %h src %h, expected type %h src %h", last_num + 1, num, roc_data[9:0], roc_data[13:10], r.et, r.src));
      if (last_num >= 0 && ts - last_ts != 48'(r.cyc - last_cyc)) fail("time stamp spacing");
      last_num = int'(num); last_ts = ts; last_cyc = r.cyc;
      roc_rd = 1;
      @(negedge clk) roc_rd = 0;
    end
    while (blocks_ready != 0) begin
      @(negedge clk) roc_ack = 1;
      @(negedge clk) roc_ack = 0;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // 1. blocks of four with readout
    for (int n = 0; n < 200; n++) begin
      do_trig(10'($urandom), 4'($urandom));
      repeat ($urandom % 5) @(negedge clk);
      checks++;
      if (roc_irq !== (blocks_ready != 0)) fail("irq");
      if (roc_irq && $urandom % 3 == 0) roc_readout();
    end
    // finish the last partial block so that the ROC can empty the buffer
    while (n_trig % 4 != 0) do_trig(10'd1, 4'd1);
    repeat (4) @(negedge clk);
    roc_readout();
    repeat (3) @(negedge clk);    // the last acknowledge reaches the status
    checks++;
    if (n_blk != 50 || n_ack != 50) fail($sformatf("blocks %0d acks %0d, expected 50", n_blk, n_ack));
    // 2. buffer-near-full BUSY, then readout clears it
    for (int n = 0; n < DEPTH - MARGIN; n++) do_trig(10'd5, 4'd9);
    repeat (2) @(negedge clk);
    checks++;
    if (!status.busy) fail("no BUSY near full"); else n_busy_full++;
    roc_readout();
    repeat (2) @(negedge clk);
    checks++;
    if (status.busy) fail("BUSY stays after readout");
    // 3. crate SD BUSY
    sd_busy = 1; repeat (2) @(negedge clk);
    checks++;
    if (!status.busy) fail("SD BUSY not passed on");
    sd_busy = 0; repeat (2) @(negedge clk);
    // 4. SyncEvent in the middle of a block
    do_trig(10'd0, 4'd6);
    do_trig(10'd0, 4'd6);
    repeat (3) @(negedge clk);
    sync_mark = 1; @(negedge clk) sync_mark = 0;
    @(negedge clk);
    checks++;
    if (!sync_pend || !status.busy || blocks_ready != 1 || !roc_irq) fail("SyncEvent did not close the block / set BUSY");
    roc_readout();
    repeat (2) @(negedge clk);
    checks++;
    if (sync_pend || status.busy) fail("SyncEvent BUSY not released after ack");
    // 5. SyncReset request passes to the status
    roc_srr = 1; repeat (2) @(negedge clk);
    checks++;
    if (!status.sync_reset_req) fail("sync reset request");
    roc_srr = 0;
    // 6. front end reset clears the counters
    do_trig(10'd3, 4'd3);
    @(negedge clk) fe_reset = 1; @(negedge clk) fe_reset = 0;
    q.delete();
    checks++;
    if (trig_num != 0 || roc_avail || blocks_ready != 0) fail("fe_reset");
    checks++;
    if (overflow) fail("overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
