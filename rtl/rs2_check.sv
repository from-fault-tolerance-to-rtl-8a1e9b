// rs2_check: Check_Redundancy of the RS2 code. A byte with one faulty part
// (I1, I2 or I3) is correctable. The decoder forms the three single-part
// candidates from the RS2 error equations (on 3 bits):
//   only I1: E1 = 7*(I1 ^ 2*I1 ^ 2*I3 ^ 4*I3 ^ 2*R1 ^ R2)
//   only I2: E2 = 7*(I2 ^ 2*I2 ^ I3 ^ 4*I3 ^ R1 ^ R2)
//   only I3: E3 = 5*(I2 ^ 2*I2 ^ I3 ^ 4*I3 ^ R1 ^ R2)
// (7*x = x^2x^4x undoes 3*, 5*x = x^4x undoes itself) and accepts the first,
// in that order, whose repaired byte re-encodes to the received redundancy.
// If none does, the byte passes unchanged and uncorrectable_o is raised.
// The trial-and-verify selection is this design's way of applying the
// equations, which the code defines per case. Combinational.
module rs2_check
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  input  logic [5:0] red_i,
  output logic [7:0] data_o,
  output logic       corrected_o,
  output logic       uncorrectable_o
);
  logic [7:0] cand;
  logic       found;

  rs2_decode u_dec (.data_i, .red_i, .cand_o(cand), .found_o(found));

  always_comb begin
    corrected_o     = (rs2_enc(data_i) != red_i) && found;
    uncorrectable_o = (rs2_enc(data_i) != red_i) && !found;
    data_o          = corrected_o ? cand : data_i;
  end
endmodule
