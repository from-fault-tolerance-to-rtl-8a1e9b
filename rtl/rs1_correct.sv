// rs1_correct: Correct_Redundancy of the RS1 code. It applies the RS1 error
// equations (E1', E2' and E = E' ^ 2E' ^ 4E' ^ 8E' on nibbles, see rs1_check)
// to the byte without deciding whether the error is correctable: the data
// always becomes data ^ {E2,E1}. Because RS1's redundancy determines its data,
// the output is always a valid codeword: faults on the data alone are
// removed, while faults that reach the redundancy turn into other data
// values instead of the fault the attacker injected. Combinational, no flags.
module rs1_correct
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  input  logic [7:0] red_i,
  output logic [7:0] data_o,
  output logic [7:0] red_o
);
  logic [3:0] e1p, e2p, e1, e2;

  always_comb begin
    e1p = data_i[3:0] ^ m2_4(data_i[3:0]) ^ m2_4(red_i[3:0]) ^ red_i[7:4];
    e2p = data_i[7:4] ^ m2_4(data_i[7:4]) ^ red_i[3:0] ^ red_i[7:4];
    e1  = e1p ^ m2_4(e1p) ^ m2_4(m2_4(e1p)) ^ m2_4(m2_4(m2_4(e1p)));
    e2  = e2p ^ m2_4(e2p) ^ m2_4(m2_4(e2p)) ^ m2_4(m2_4(m2_4(e2p)));
    data_o = data_i ^ {e2, e1};
    red_o  = red_i;
  end
endmodule
