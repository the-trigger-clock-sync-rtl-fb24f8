// tb_ts_event_data: TS event data streams against a queue model.
// Random main and sub-TS triggers and random reads, with small depths so
// that the FIFOs fill and overflow. The model keeps its own trigger numbers
// and timer: every record read must match the model's record (number, time
// stamp, header, SyncEvent, type), records that meet a full FIFO must be
// dropped and flagged (fullness is judged before a read in the same
// clock), and a clear must empty every stream and restart the numbers at 1.
// Also checks that avail rises 1 clock after acceptance.
module tb_ts_event_data;
  import tcs_pkg::*;

  localparam int NP = 4, DEPTH = 16, PDEPTH = 8;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic clr = 0;
  logic [47:0] ts_time = '0;
  trig_t acc = '0;
  logic [NP-1:0][2:0] part_acc = '0;
  logic rd = 0, avail, ovf;
  logic [94:0] data;
  logic [NP-1:0] prd = '0, pavail, povf;
  logic [NP-1:0][82:0] pdata;

  ts_event_data #(.NP(NP), .DEPTH(DEPTH), .PDEPTH(PDEPTH)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL cyc %0d: %s", cyc, s);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [94:0] mq [$];
  logic [82:0] pq [NP][$];
  int num = 0, pnum [NP];
  bit  m_ovf = 0, p_ovf [NP];
  int  n_drop = 0, n_clr = 0, n_read = 0;

  initial begin
    for (int p = 0; p < NP; p++) begin pnum[p] = 0; p_ovf[p] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 6000; k++) begin
      logic [3:0] h;
      // outputs before this clock's edge
      checks++;
      if (avail != (mq.size() != 0)) fail("main avail");
      else if (avail && data != mq[0]) fail($sformatf("main record %h, expected %h", data, mq[0]));
      checks++;
      if (ovf != m_ovf) fail("main overflow flag");
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (pavail[p] != (pq[p].size() != 0)) fail($sformatf("sub-TS %0d avail", p));
        else if (pavail[p] && pdata[p] != pq[p][0]) fail($sformatf("sub-TS %0d record", p));
        checks++;
        if (povf[p] != p_ovf[p]) fail($sformatf("sub-TS %0d overflow flag", p));
      end
      // stimulus for this clock (phase of the test sets the read rate)
      clr = ($urandom % 1500 == 0);
      rd  = ($urandom % ((k / 1000) % 2 == 0 ? 4 : 1) == 0);
      prd = NP'($urandom);
      acc = '0;
      if ($urandom % 3 == 0) begin
        h = ($urandom % 3 == 0) ? 4'(TW_GTP) : ($urandom % 2 == 0) ? 4'(TW_EXT) : 4'(TW_VME_TRIG);
        acc = '{valid: 1'b1, hdr: tw_hdr_e'(h), etype: 10'($urandom), sync_ev: 1'($urandom % 5 == 0)};
      end
      for (int p = 0; p < NP; p++) part_acc[p] = ($urandom % 4 == 0) ? 3'($urandom % 8) : 3'd0;
      // model of the edge
      if (clr) begin
        mq.delete(); num = 0; m_ovf = 0;
        for (int p = 0; p < NP; p++) begin pq[p].delete(); pnum[p] = 0; p_ovf[p] = 0; end
        n_clr++;
      end else begin
        // fullness is judged before this clock's read
        bit mfull;
        mfull = (mq.size() == DEPTH);
        if (rd && mq.size() != 0) begin void'(mq.pop_front()); n_read++; end
        if (acc.valid) begin
          num++;
          if (!mfull) mq.push_back({32'(num), ts_time, 4'(acc.hdr), acc.sync_ev, acc.etype});
          else begin m_ovf = 1; n_drop++; end
        end
        for (int p = 0; p < NP; p++) begin
          bit pfull;
          pfull = (pq[p].size() == PDEPTH);
          if (prd[p] && pq[p].size() != 0) void'(pq[p].pop_front());
          if (part_acc[p] != 0) begin
            pnum[p]++;
            if (!pfull) pq[p].push_back({32'(pnum[p]), ts_time, part_acc[p]});
            else p_ovf[p] = 1;
          end
        end
      end
      @(negedge clk);
      ts_time = ts_time + 48'd1 + 48'($urandom % 3);
      cyc++;
    end
    checks++;
    if (n_drop == 0 || n_clr == 0 || n_read < 1000) fail($sformatf("coverage: %0d dropped, %0d clears, %0d reads", n_drop, n_clr, n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
