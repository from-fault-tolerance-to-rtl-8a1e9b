// aes_mix_columns: the AES MixColumns transform on all four columns,
// b = M*a with M = circ(2,3,1,1) over GF(2^8). Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  state_t d_i,
  output state_t d_o
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    assign d_o[4*c +: 4] = mix_column(d_i[4*c +: 4]);
  end
endmodule
