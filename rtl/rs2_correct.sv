// rs2_correct: Correct_Redundancy of the RS2 code. Applies the single-part
// repair found by the RS2 decoder (see rs2_decode) without reporting whether
// the error was correctable; a byte no hypothesis explains passes unchanged.
// Combinational, no flags.
module rs2_correct
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  input  logic [5:0] red_i,
  output logic [7:0] data_o
);
  logic found;
  rs2_decode u_dec (.data_i, .red_i, .cand_o(data_o), .found_o(found));
endmodule
