// hc_encode: Hamming-code (HC) encoder, four check bits per byte. The
// codeword is a (12,8) single-error-correcting Hamming code: check bit p[k]
// sits at codeword position 2^k and covers the positions whose index has
// bit k set; data bits d0..d7 fill positions 3,5,6,7,9,10,11,12.
// Combinational.
module hc_encode
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  output logic [3:0] red_o
);
  assign red_o = hc_enc(data_i);
endmodule
