// ts_event_type: two-level lookup table that turns the pattern of trigger
// inputs firing in one clock into a readout trigger and its event type.
//
// The N_IN inputs are cut into groups of GROUP_W. Each group addresses a
// first-level table (tcs_lut) holding a CODE_W-bit class code. The
// concatenated codes address the second-level table, whose entry is
// {sync_ev, etype[TYPE_W-1:0]}: an event type of 0 means "no trigger", and
// sync_ev marks patterns that must produce a SyncEvent. Both levels are
// block RAMs with registered outputs, so the result appears 2 clocks after
// the input pattern. A clock with no input set never gives a trigger,
// whatever the tables hold at address 0.
// Table loading: wr_sel 0..G-1 picks a first-level table, wr_sel G the
// second-level table; wr_addr/wr_data are right-aligned.
// That the table is multilevel and in block RAM follows the document; the
// group size, code width and the SyncEvent bit position are this design's.
module ts_event_type #(
  parameter int unsigned N_IN    = 30,
  parameter int unsigned GROUP_W = 10,
  parameter int unsigned CODE_W  = 4,
  parameter int unsigned TYPE_W  = 10,
  // derived
  parameter int unsigned G       = (N_IN + GROUP_W - 1) / GROUP_W,
  parameter int unsigned L2_AW   = G * CODE_W,
  parameter int unsigned WA_W    = (L2_AW > GROUP_W) ? L2_AW : GROUP_W,
  parameter int unsigned WD_W    = TYPE_W + 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N_IN-1:0]       trig_in,
  // table loading
  input  logic                  wr_en,
  input  logic [$clog2(G+1)-1:0] wr_sel,
  input  logic [WA_W-1:0]       wr_addr,
  input  logic [WD_W-1:0]       wr_data,
  // result, 2 clocks after trig_in
  output logic                  valid,
  output logic [TYPE_W-1:0]     etype,
  output logic                  sync_ev
);
  logic [G*GROUP_W-1:0] padded;
  logic [G-1:0][CODE_W-1:0] code;
  logic [WD_W-1:0] l2_q;
  logic any_q1, any_q2;

  always_comb begin
    padded = '0;
    padded[N_IN-1:0] = trig_in;
  end

  for (genvar g = 0; g < G; g++) begin : g_l1
    tcs_lut #(.AW(GROUP_W), .DW(CODE_W)) u_l1 (
      .clk,
      .wr_en  (wr_en && wr_sel == g),
      .wr_addr(wr_addr[GROUP_W-1:0]),
      .wr_data(wr_data[CODE_W-1:0]),
      .rd_addr(padded[g*GROUP_W +: GROUP_W]),
      .rd_data(code[g])
    );
  end

  tcs_lut #(.AW(L2_AW), .DW(WD_W)) u_l2 (
    .clk,
    .wr_en  (wr_en && int'(wr_sel) == G),
    .wr_addr(wr_addr[L2_AW-1:0]),
    .wr_data(wr_data),
    .rd_addr(code),
    .rd_data(l2_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      any_q1 <= 1'b0;
      any_q2 <= 1'b0;
    end else begin
      any_q1 <= |trig_in;
      any_q2 <= any_q1;
    end
  end

  always_comb begin
    etype   = l2_q[TYPE_W-1:0];
    sync_ev = any_q2 && l2_q[TYPE_W];
    valid   = any_q2 && (etype != '0);
  end
endmodule
