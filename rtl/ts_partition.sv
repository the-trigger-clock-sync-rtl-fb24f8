// ts_partition: the four sub-trigger-supervisors (sub-TS) used to partition
// the DAQ with a single TS.
//
// Each sub-TS picks 5 of the 30 GTP inputs, 5 of the 30 front-panel
// synchronous inputs and 3 of the 15 asynchronous inputs (selection indices
// are configuration), forms a 13-bit pattern and looks it up in its own
// 8192-entry table of 3-bit event types (0 = no trigger, 1..7 event types).
// The result, one 3-bit type per partition, is valid 2 clocks after the
// inputs (one register for the selection, one for the block-RAM read).
// The input counts, table size and 3-bit code follow the document; the
// selection registers and the pipeline are this design's.
module ts_partition #(
  parameter int unsigned N_PART = 4,
  parameter int unsigned N_GTP  = 30,
  parameter int unsigned N_EXT  = 30,
  parameter int unsigned N_ASY  = 15
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [N_GTP-1:0]        gtp,
  input  logic [N_EXT-1:0]        ext,
  input  logic [N_ASY-1:0]        asy,
  // per partition input selection
  input  logic [N_PART-1:0][4:0][$clog2(N_GTP)-1:0] sel_gtp,
  input  logic [N_PART-1:0][4:0][$clog2(N_EXT)-1:0] sel_ext,
  input  logic [N_PART-1:0][2:0][$clog2(N_ASY)-1:0] sel_asy,
  // table loading
  input  logic                    wr_en,
  input  logic [$clog2(N_PART)-1:0] wr_part,
  input  logic [12:0]             wr_addr,
  input  logic [2:0]              wr_data,
  output logic [N_PART-1:0][2:0]  ptype
);
  logic [N_PART-1:0][12:0] pat_q;
  logic [N_PART-1:0]       any_q;
  logic [N_PART-1:0][2:0]  lut_q;

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PART; p++) begin
      for (int k = 0; k < 5; k++) begin
        pat_q[p][k]     <= gtp[sel_gtp[p][k]];
        pat_q[p][5 + k] <= ext[sel_ext[p][k]];
      end
      for (int k = 0; k < 3; k++) pat_q[p][10 + k] <= asy[sel_asy[p][k]];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) any_q <= '0;
    else for (int p = 0; p < N_PART; p++) any_q[p] <= |pat_q[p];
  end

  for (genvar p = 0; p < N_PART; p++) begin : g_sub
    tcs_lut #(.AW(13), .DW(3)) u_lut (
      .clk,
      .wr_en  (wr_en && wr_part == p),
      .wr_addr(wr_addr),
      .wr_data(wr_data),
      .rd_addr(pat_q[p]),
      .rd_data(lut_q[p])
    );
    assign ptype[p] = any_q[p] ? lut_q[p] : 3'd0;
  end
endmodule
