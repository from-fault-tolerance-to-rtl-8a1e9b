// rs1_mix_columns: MixColumns on an RS1-protected state. The data uses the
// ordinary MixColumns. The redundancy is computed from the redundancy alone:
// RS1 is linear, so R(2*a ^ 3*b ^ c ^ d) = R(2*a) ^ R(3*b) ^ R(c) ^ R(d),
// with R(2*a) a fixed XOR network of the bits of R(a) and
// R(3*a) = R(a) ^ R(2*a). Both networks are the paper's equations for
// the redundancy of a byte doubled and tripled. Combinational.
module rs1_mix_columns
  import aes_pkg::*;
(
  input  state_t d_i,
  input  state_t r_i,
  output state_t d_o,
  output state_t r_o
);
  // Redundancy of (a * 2) from the redundancy R of a.
  function automatic logic [7:0] red_x2(input logic [7:0] r);
    logic [7:0] o;
    o[0] = r[0] ^ r[1] ^ r[2] ^ r[4] ^ r[5] ^ r[6] ^ r[7];
    o[1] = r[1] ^ r[2] ^ r[3] ^ r[4] ^ r[5] ^ r[6] ^ r[7];
    o[2] = r[1];
    o[3] = r[0] ^ r[1] ^ r[3] ^ r[4] ^ r[5] ^ r[6] ^ r[7];
    o[4] = ^r;
    o[5] = r[0] ^ r[1] ^ r[2] ^ r[5] ^ r[6] ^ r[7];
    o[6] = r[5];
    o[7] = r[0] ^ r[1] ^ r[2] ^ r[3] ^ r[4] ^ r[5] ^ r[7];
    return o;
  endfunction

  function automatic logic [7:0] red_x3(input logic [7:0] r);
    return r ^ red_x2(r);
  endfunction

  aes_mix_columns u_mc (.d_i(d_i), .d_o(d_o));

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar k = 0; k < 4; k++) begin : g_row
      assign r_o[4*c + k] = red_x2(r_i[4*c + k])           ^ red_x3(r_i[4*c + (k+1)%4]) ^
                            r_i[4*c + (k+2)%4]             ^ r_i[4*c + (k+3)%4];
    end
  end
endmodule
