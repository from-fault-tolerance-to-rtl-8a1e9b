// aes_inv_mix_columns: InvMixColumns on all four columns,
// M^-1 = circ(14,11,13,9) over GF(2^8). Combinational. Inverse module of
// MixColumns in the low-latency CED core.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  state_t d_i,
  output state_t d_o
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    assign d_o[4*c +: 4] = inv_mix_column(d_i[4*c +: 4]);
  end
endmodule
