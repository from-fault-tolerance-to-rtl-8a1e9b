// aes_sub_bytes: the AES SubBytes transform, sixteen S-boxes side by side.
// Combinational. The S-box is a 256-entry table computed at elaboration time
// from its algebraic definition (see aes_pkg), as a lookup-table design would
// hold it.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  state_t d_i,
  output state_t d_o
);
  for (genvar b = 0; b < 16; b++) begin : g_byte
    assign d_o[b] = SBOX[d_i[b]];
  end
endmodule
