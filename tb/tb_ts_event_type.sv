// tb_ts_event_type: loads the three first-level tables and the second-level
// table of the GTP configuration (30 inputs, groups of 10, 4-bit codes)
// with formula contents, then applies random input patterns and checks the
// event type, SyncEvent flag and valid two clocks later against a model
// computed from the same formulas. A pattern of all zeros must never give a
// trigger.
module tb_ts_event_type;
  localparam int N = 30, GW = 10, CW = 4, TW = 10, G = 3;
  logic clk = 0, rst = 1;
  logic [N-1:0] trig_in = '0;
  logic wr_en = 0;
  logic [1:0] wr_sel = '0;
  logic [11:0] wr_addr = '0;
  logic [10:0] wr_data = '0;
  logic valid, sync_ev;
  logic [TW-1:0] etype;
  int checks = 0, failures = 0, n_valid = 0, n_sync = 0;

  ts_event_type #(.N_IN(N), .GROUP_W(GW), .CODE_W(CW), .TYPE_W(TW)) dut (.*);
  always #2 clk = ~clk;

  function automatic logic [3:0] l1(int g, int a);
    return 4'((a % 13 + g * 5) & 15);
  endfunction
  function automatic logic [10:0] l2(int a);
    logic [9:0] t;
    t = 10'((a * 37 + 11) % 1024);
    if (a % 9 == 0) t = '0;              // some patterns give no trigger
    return {1'(a % 17 == 1), t};
  endfunction
  function automatic logic [10:0] model(logic [N-1:0] p);
    logic [11:0] a;
    for (int g = 0; g < G; g++) a[g*4 +: 4] = l1(g, int'(p[g*GW +: GW]));
    return l2(int'(a));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] hist [$];
  initial begin
    for (int g = 0; g <= G; g++) begin
      for (int a = 0; a < ((g == G) ? 4096 : 1024); a++) begin
        @(negedge clk); wr_en = 1; wr_sel = 2'(g); wr_addr = 12'(a);
        wr_data = (g == G) ? l2(a) : 11'(l1(g, a));
      end
    end
    @(negedge clk); wr_en = 0; rst = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      case ($urandom % 4)
        0: trig_in = '0;
        1: trig_in = N'(1) << ($urandom % N);
        default: trig_in = N'({$urandom, $urandom});
      endcase
      hist.push_back(trig_in);
      if (c >= 2) begin
        logic [N-1:0] p;
        logic [10:0] m;
        p = hist[c - 2];
        m = model(p);
        checks++;
        if (p == '0) begin
          if (valid || sync_ev) begin failures++; $display("FAIL idle pattern gave a trigger"); end
        end else if (valid !== (m[9:0] != 0) || sync_ev !== m[10] || (valid && etype !== m[9:0])) begin
          failures++;
          if (failures < 6) $display("FAIL pattern %h: got v%0d s%0d %h exp %h", p, valid, sync_ev, etype, m);
        end
        n_valid += valid; n_sync += sync_ev;
      end
    end
    checks++;
    if (n_valid < 1000 || n_sync < 20) begin failures++; $display("FAIL coverage %0d %0d", n_valid, n_sync); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
