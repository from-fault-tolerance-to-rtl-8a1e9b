// rs2_decode: shared decoder of rs2_check and rs2_correct. It evaluates the
// three single-part RS2 error hypotheses (only I1, only I2 or only I3 in
// error) from the RS2 error equations and returns the first repaired byte
// that re-encodes to the received redundancy (found_o), else the input byte.
// Combinational.
module rs2_decode
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  input  logic [5:0] red_i,
  output logic [7:0] cand_o,
  output logic       found_o
);
  logic [2:0] i1, i2, i3, r1, r2, e1p, e2p, e3p, e1, e2, e3;
  logic [7:0] c1, c2, c3;

  always_comb begin
    i1 = data_i[2:0];
    i2 = data_i[5:3];
    i3 = {1'b0, data_i[7:6]};
    r1 = red_i[2:0];
    r2 = red_i[5:3];
    e1p = i1 ^ m2_3(i1) ^ m2_3(i3) ^ m4_3(i3) ^ m2_3(r1) ^ r2;
    e2p = i2 ^ m2_3(i2) ^ i3 ^ m4_3(i3) ^ r1 ^ r2;
    e3p = e2p;
    e1 = e1p ^ m2_3(e1p) ^ m4_3(e1p);
    e2 = e2p ^ m2_3(e2p) ^ m4_3(e2p);
    e3 = e3p ^ m4_3(e3p);
    c1 = data_i ^ {5'b0, e1};
    c2 = data_i ^ {2'b0, e2, 3'b0};
    c3 = data_i ^ {e3[1:0], 6'b0};
    found_o = 1'b1;
    if      (rs2_enc(c1) == red_i)                  cand_o = c1;
    else if (rs2_enc(c2) == red_i)                  cand_o = c2;
    else if (!e3[2] && rs2_enc(c3) == red_i)        cand_o = c3;
    else begin
      cand_o  = data_i;
      found_o = 1'b0;
    end
  end
endmodule
