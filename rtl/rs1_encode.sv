// rs1_encode: RS1 encoder. Adds 8 bits of redundancy to a byte:
// R1 = I2 ^ I1 and R2 = 2*I2 ^ I1 on nibbles (I2 = high nibble of the data,
// R2 = high nibble of the redundancy), with 2*x a nibble shift that drops
// the top bit. Combinational. The map data -> redundancy is one-to-one.
module rs1_encode
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  output logic [7:0] red_o
);
  assign red_o = rs1_enc(data_i);
endmodule
