// tcs_lut: writable lookup table, the block-RAM building block of the TS
// event type generation.
//
// A simple dual-port memory: a configuration write port (wr_en, wr_addr,
// wr_data) and a read port with a registered output, as a block RAM has.
// rd_data holds the entry addressed by rd_addr one clock earlier (latency 1).
// The table contents are loaded at run time, before triggers are enabled.
module tcs_lut #(
  parameter int unsigned AW = 10,   // address width (number of inputs looked up)
  parameter int unsigned DW = 4     // entry width
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
