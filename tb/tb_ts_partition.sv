// tb_ts_partition: gives each of the four sub-TS its own input selection
// (5 GTP, 5 external, 3 asynchronous) and a formula-filled 8192-entry table,
// drives random inputs and checks every partition's 3-bit type two clocks
// later against a model built from the same selection and formula.
module tb_ts_partition;
  localparam int NP = 4;
  logic clk = 0, rst = 1;
  logic [29:0] gtp = '0, ext = '0;
  logic [14:0] asy = '0;
  logic [NP-1:0][4:0][4:0] sel_gtp, sel_ext;
  logic [NP-1:0][2:0][3:0] sel_asy;
  logic wr_en = 0;
  logic [1:0] wr_part = '0;
  logic [12:0] wr_addr = '0;
  logic [2:0] wr_data = '0;
  logic [NP-1:0][2:0] ptype;
  int checks = 0, failures = 0, nz = 0;

  ts_partition #(.N_PART(NP)) dut (.*);
  always #2 clk = ~clk;

  function automatic logic [2:0] tbl(int p, int a);
    return 3'((a * (p + 3) + p) % 8);
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [29:0] g, e; logic [14:0] a; } in_t;
  in_t hist [$];
  initial begin
    for (int p = 0; p < NP; p++) begin
      for (int k = 0; k < 5; k++) begin
        sel_gtp[p][k] = 5'((p * 7 + k * 5) % 30);
        sel_ext[p][k] = 5'((p * 3 + k * 6 + 1) % 30);
      end
      for (int k = 0; k < 3; k++) sel_asy[p][k] = 4'((p * 4 + k * 5) % 15);
    end
    for (int p = 0; p < NP; p++)
      for (int a = 0; a < 8192; a++) begin
        @(negedge clk); wr_en = 1; wr_part = 2'(p); wr_addr = 13'(a); wr_data = tbl(p, a);
      end
    @(negedge clk); wr_en = 0; rst = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin gtp = '0; ext = '0; asy = '0; end
      else begin gtp = 30'($urandom); ext = 30'($urandom); asy = 15'($urandom); end
      hist.push_back('{gtp, ext, asy});
      if (c >= 2) begin
        in_t v;
        v = hist[c - 2];
        for (int p = 0; p < NP; p++) begin
          logic [12:0] a;
          logic [2:0] e;
          for (int k = 0; k < 5; k++) begin a[k] = v.g[sel_gtp[p][k]]; a[5+k] = v.e[sel_ext[p][k]]; end
          for (int k = 0; k < 3; k++) a[10+k] = v.a[sel_asy[p][k]];
          e = (a == 0) ? 3'd0 : tbl(p, int'(a));
          checks++;
          if (ptype[p] !== e) begin
            failures++;
            if (failures < 6) $display("FAIL part %0d clk %0d: got %0d exp %0d", p, c, ptype[p], e);
          end
          nz += (e != 0);
        end
      end
    end
    checks++;
    if (nz < 1000) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
