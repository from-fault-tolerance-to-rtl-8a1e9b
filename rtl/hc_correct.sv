// hc_correct: Correct_Redundancy of the Hamming code. The syndrome (recomputed
// check bits XOR received ones) is the codeword position of a single-bit
// error; if it names a data position that data bit is flipped, otherwise the
// data passes unchanged. No flags: multi-bit errors are "corrected" into
// other values. Combinational.
module hc_correct
  import ecc_pkg::*;
(
  input  logic [7:0] data_i,
  input  logic [3:0] red_i,
  output logic [7:0] data_o
);
  logic [3:0] syn;
  logic [7:0] flip;

  always_comb begin
    syn = hc_enc(data_i) ^ red_i;
    unique case (syn)
      4'd3:    flip = 8'h01;
      4'd5:    flip = 8'h02;
      4'd6:    flip = 8'h04;
      4'd7:    flip = 8'h08;
      4'd9:    flip = 8'h10;
      4'd10:   flip = 8'h20;
      4'd11:   flip = 8'h40;
      4'd12:   flip = 8'h80;
      default: flip = 8'h00;
    endcase
    data_o = data_i ^ flip;
  end
endmodule
