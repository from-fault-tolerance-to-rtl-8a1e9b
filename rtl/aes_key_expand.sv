// aes_key_expand: one step of the AES-128 key schedule. From round key
// k(r-1) and the round constant rcon of round r it forms k(r):
//   w0' = w0 ^ SubWord(RotWord(w3)) ^ {rcon,0,0,0}, w1' = w1 ^ w0', ...
// It also returns the next round constant (rcon*2 in GF(2^8)).
// Combinational; the cores iterate it once per round (on-the-fly schedule).
module aes_key_expand
  import aes_pkg::*;
(
  input  state_t     key_i,
  input  logic [7:0] rcon_i,
  output state_t     key_o,
  output logic [7:0] rcon_o
);
  word_t rot, sub;
  assign rot = {key_i[13], key_i[14], key_i[15], key_i[12]};
  for (genvar b = 0; b < 4; b++) begin : g_sub
    assign sub[b] = SBOX[rot[b]];
  end
  always_comb begin
    key_o[0:3]   = key_i[0:3] ^ sub ^ {rcon_i, 24'h0};
    key_o[4:7]   = key_i[4:7]   ^ key_o[0:3];
    key_o[8:11]  = key_i[8:11]  ^ key_o[4:7];
    key_o[12:15] = key_i[12:15] ^ key_o[8:11];
  end
  assign rcon_o = xtime(rcon_i);
endmodule
