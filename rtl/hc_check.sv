// hc_check: Check_Redundancy of the Hamming code, used for detection only:
// error_o is raised when the recomputed check bits differ from the received
// ones; no correction is attempted. Combinational.
module hc_check
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  input  logic [3:0] red_i,
  output logic       error_o
);
  assign error_o = (hc_enc(data_i) != red_i);
endmodule
