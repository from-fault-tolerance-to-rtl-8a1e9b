// rs2_encode: RS2 encoder. Adds 6 bits of redundancy to a byte split as
// I3 (bits 7:6), I2 (bits 5:3), I1 (bits 2:0):
// R1 = I3 ^ I2 ^ I1, R2 = 4*I3 ^ 2*I2 ^ I1 on 3 bits (k*x truncated
// carry-less product), red_o = {R2,R1}. Combinational.
module rs2_encode
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  output logic [5:0] red_o
);
  assign red_o = rs2_enc(data_i);
endmodule
