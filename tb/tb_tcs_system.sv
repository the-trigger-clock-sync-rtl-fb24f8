// tb_tcs_system: end-to-end test of the trigger system at reduced size:
// 2 TD boards with 2 TIs each (fibres of 150 m, 50 m, 5 m and 4 m). The
// sequence and its checks are described in tcs_system_tb_body.svh.
module tb_tcs_system;
  import tcs_pkg::*;
  localparam int NTD = 2, NLK = 2;
  `include "tcs_system_tb_body.svh"

  tcs_system #(.N_TD(NTD), .N_LINK(NLK), .N_FE(NFE)) dut (.*);
endmodule
