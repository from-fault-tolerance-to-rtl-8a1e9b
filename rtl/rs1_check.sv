// rs1_check: Check_Redundancy of the RS1 code, for a byte and its 8-bit
// redundancy. It re-encodes the data; if that matches the received
// redundancy the byte passes. Otherwise it forms the nibble errors
//   E1' = I1 ^ 2*I1 ^ 2*R1 ^ R2,  E2' = I2 ^ 2*I2 ^ R1 ^ R2,
//   E   = E' ^ 2*E' ^ 4*E' ^ 8*E'      (all on 4 bits)
// which are the errors on the data when the redundancy is intact. When
// exactly one of E1, E2 is non-zero the error is taken as correctable and
// the data is repaired (corrected_o); otherwise the byte is passed unchanged
// and uncorrectable_o is raised. The redundancy is passed unchanged.
// Combinational. The equations are the ones RS1 is defined by; the decision
// rule "exactly one nibble in error" is this design's reading of the code's
// correction condition.
module rs1_check
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  input  logic [7:0] red_i,
  output logic [7:0] data_o,
  output logic [7:0] red_o,
  output logic       corrected_o,
  output logic       uncorrectable_o
);
  logic [3:0] e1p, e2p, e1, e2;
  logic       syn;

  always_comb begin
    e1p = data_i[3:0] ^ m2_4(data_i[3:0]) ^ m2_4(red_i[3:0]) ^ red_i[7:4];
    e2p = data_i[7:4] ^ m2_4(data_i[7:4]) ^ red_i[3:0] ^ red_i[7:4];
    e1  = e1p ^ m2_4(e1p) ^ m2_4(m2_4(e1p)) ^ m2_4(m2_4(m2_4(e1p)));
    e2  = e2p ^ m2_4(e2p) ^ m2_4(m2_4(e2p)) ^ m2_4(m2_4(m2_4(e2p)));
    syn = (rs1_enc(data_i) != red_i);
    corrected_o     = syn && ((e1 == 4'h0) != (e2 == 4'h0));
    uncorrectable_o = syn && !corrected_o;
    data_o = corrected_o ? (data_i ^ {e2, e1}) : data_i;
    red_o  = red_i;
  end
endmodule
