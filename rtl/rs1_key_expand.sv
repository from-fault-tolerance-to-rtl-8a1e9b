// rs1_key_expand: one step of the AES-128 key schedule with RS1 redundancy
// carried alongside the key. The key bytes follow the ordinary schedule
// (aes_key_expand); the redundancy bytes take the same path, with SR-boxes
// in place of the S-boxes of SubWord, XOR in place of XOR (RS1 is linear),
// and the RS1 redundancy of the round constant. Combinational.
module rs1_key_expand
  import aes_pkg::*;
  import ecc_pkg::*;
(
  input  state_t     key_i,
  input  state_t     red_i,
  input  logic [7:0] rcon_i,
  output state_t     key_o,
  output state_t     red_o,
  output logic [7:0] rcon_o
);
  word_t rot, sub;

  aes_key_expand u_key (.key_i(key_i), .rcon_i(rcon_i), .key_o(key_o), .rcon_o(rcon_o));

  assign rot = {red_i[13], red_i[14], red_i[15], red_i[12]};
  for (genvar b = 0; b < 4; b++) begin : g_sr
    sr_box u_sr (.red_i(rot[b]), .red_o(sub[b]));
  end

  always_comb begin
    red_o[0:3]   = red_i[0:3] ^ sub ^ {rs1_enc(rcon_i), 24'h0};
    red_o[4:7]   = red_i[4:7]   ^ red_o[0:3];
    red_o[8:11]  = red_i[8:11]  ^ red_o[4:7];
    red_o[12:15] = red_i[12:15] ^ red_o[8:11];
  end
endmodule
