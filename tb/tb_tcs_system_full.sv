// tb_tcs_system_full: the same end-to-end run as tb_tcs_system, with the
// system at its full size: 16 TD boards with 8 TIs each (128 front end
// crates, 16 front end slots per crate), every parameter at its default.
module tb_tcs_system_full;
  import tcs_pkg::*;
  localparam int NTD = 16, NLK = 8;
  `include "tcs_system_tb_body.svh"

  tcs_system dut (.*);
endmodule
