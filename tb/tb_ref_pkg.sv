// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL. AES-128 follows FIPS-197 with byte arrays; the S-box is built by
// searching for each multiplicative inverse. The RS1/RS2/HC encoders are
// written bit by bit from their defining equations. init() must be called
// once before sbox()/inv_sbox() are used.
package tb_ref_pkg;

  logic [7:0] sbox_t [256];
  logic [7:0] isbox_t [256];

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic void init();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] v = 8'h00, s;
      for (int y = 1; y < 256; y++) if (gf_mul(8'(x), 8'(y)) == 8'h01) v = 8'(y);
      s = v ^ {v[6:0], v[7]} ^ {v[5:0], v[7:6]} ^ {v[4:0], v[7:5]} ^ {v[3:0], v[7:4]} ^ 8'h63;
      sbox_t[x] = s;
      isbox_t[s] = 8'(x);
    end
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return sbox_t[x];
  endfunction

  function automatic logic [7:0] bget(input logic [127:0] s, input int b);
    return s[127 - 8*b -: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    for (int b = 0; b < 16; b++) o[127 - 8*b -: 8] = sbox_t[bget(s, b)];
    return o;
  endfunction

  function automatic logic [127:0] inv_sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    for (int b = 0; b < 16; b++) o[127 - 8*b -: 8] = isbox_t[bget(s, b)];
    return o;
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = bget(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic logic [127:0] inv_shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = bget(s, 4*c + r);
    return o;
  endfunction

  function automatic logic [127:0] mix_mat(input logic [127:0] s, input logic [7:0] m0,
                                           input logic [7:0] m1, input logic [7:0] m2,
                                           input logic [7:0] m3);
    logic [127:0] o;
    logic [7:0] m [4];
    m = '{m0, m1, m2, m3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc = 8'h00;
        for (int k = 0; k < 4; k++) acc ^= gf_mul(m[(k - r + 4) % 4], bget(s, 4*c + k));
        o[127 - 8*(4*c + r) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    return mix_mat(s, 8'h02, 8'h03, 8'h01, 8'h01);
  endfunction

  function automatic logic [127:0] inv_mix_columns(input logic [127:0] s);
    return mix_mat(s, 8'h0e, 8'h0b, 8'h0d, 8'h09);
  endfunction

  function automatic logic [127:0] next_key(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w [4];
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {w[3][23:0], w[3][31:24]};
    t = {sbox_t[t[31:24]], sbox_t[t[23:16]], sbox_t[t[15:8]], sbox_t[t[7:0]]} ^ {rcon, 24'h0};
    w[0] ^= t;
    w[1] ^= w[0];
    w[2] ^= w[1];
    w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s = pt ^ key, k = key;
    logic [7:0] rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, rc);
      rc = gf_mul(rc, 8'h02);
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s ^= k;
    end
    return s;
  endfunction

  // RS1 redundancy, bit by bit.
  function automatic logic [7:0] rs1(input logic [7:0] i);
    return {i[3] ^ i[6], i[2] ^ i[5], i[1] ^ i[4], i[0],
            i[3] ^ i[7], i[2] ^ i[6], i[1] ^ i[5], i[0] ^ i[4]};
  endfunction

  function automatic logic [127:0] rs1_state(input logic [127:0] s);
    logic [127:0] o;
    for (int b = 0; b < 16; b++) o[127 - 8*b -: 8] = rs1(bget(s, b));
    return o;
  endfunction

  // RS2 redundancy {R2,R1}: R1 = I3^I2^I1, R2 = 4*I3 ^ 2*I2 ^ I1 (3 bits).
  function automatic logic [5:0] rs2(input logic [7:0] i);
    logic [2:0] r1, r2;
    r1 = {1'b0, i[7:6]} ^ i[5:3] ^ i[2:0];
    r2 = {i[6], 2'b00} ^ {i[4:3], 1'b0} ^ i[2:0];
    return {r2, r1};
  endfunction

  // Hamming (12,8): data at positions 3,5,6,7,9,10,11,12; parity k covers
  // the positions with bit k set.
  function automatic logic [3:0] hc(input logic [7:0] d);
    int pos [8] = '{3, 5, 6, 7, 9, 10, 11, 12};
    logic [3:0] p = '0;
    for (int j = 0; j < 8; j++) if (d[j]) p ^= 4'(pos[j]);
    return p;
  endfunction

endpackage
