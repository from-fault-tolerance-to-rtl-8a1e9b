// aes_inv_sub_bytes: InvSubBytes, sixteen inverse S-boxes. Combinational.
// In the low-latency CED core it is the inverse module that checks
// SubBytes one time slot after SubBytes ran.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  state_t d_i,
  output state_t d_o
);
  for (genvar b = 0; b < 16; b++) begin : g_byte
    assign d_o[b] = INV_SBOX[d_i[b]];
  end
endmodule
