// aes_pkg: types, constants and arithmetic shared by the AES-128 encryption
// datapaths (FIPS-197). The state is sixteen bytes, byte 0 being the first
// byte of the 128-bit block (its most significant byte); byte i sits in row
// i%4, column i/4. The S-box and its inverse are built at elaboration time
// from their definition (inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, then the
// affine map with constant 0x63), so no table has to be typed in.
// Also holds the operation code and the fault-injection request that both
// protected cores accept; the injection port is a test hook of this design.
package aes_pkg;

  typedef logic [0:15][7:0] state_t;
  typedef logic [0:3][7:0]  word_t;
  typedef logic [255:0][7:0] table_t;

  // The four AES round operations, in the order a round applies them.
  typedef enum logic [1:0] {
    OP_SB  = 2'd0,  // SubBytes
    OP_SR  = 2'd1,  // ShiftRows
    OP_MC  = 2'd2,  // MixColumns
    OP_ARK = 2'd3   // AddRoundKey
  } op_e;

  // Fault-injection request: XOR dmask into data byte idx (and rmask into its
  // redundancy byte, where the core carries one) at operation op of round rnd.
  typedef struct packed {
    logic       en;
    logic [3:0] rnd;
    op_e        op;
    logic [3:0] idx;
    logic [7:0] dmask;
    logic [7:0] rmask;
  } fault_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // a^254 is the multiplicative inverse for a != 0 and gives 0 for 0.
  function automatic logic [7:0] ginv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);   // exponent 254 = 0b11111110
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic table_t make_sbox();
    table_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(ginv(8'(i)));
    return t;
  endfunction

  function automatic table_t make_inv_sbox();
    table_t f, t;
    f = make_sbox();
    for (int i = 0; i < 256; i++) t[f[i]] = 8'(i);
    return t;
  endfunction

  localparam table_t SBOX     = make_sbox();
  localparam table_t INV_SBOX = make_inv_sbox();

  function automatic word_t mix_column(input word_t a);
    word_t b;
    b[0] = xtime(a[0]) ^ xtime(a[1]) ^ a[1] ^ a[2] ^ a[3];
    b[1] = a[0] ^ xtime(a[1]) ^ xtime(a[2]) ^ a[2] ^ a[3];
    b[2] = a[0] ^ a[1] ^ xtime(a[2]) ^ xtime(a[3]) ^ a[3];
    b[3] = xtime(a[0]) ^ a[0] ^ a[1] ^ a[2] ^ xtime(a[3]);
    return b;
  endfunction

  function automatic word_t inv_mix_column(input word_t a);
    word_t b;
    for (int r = 0; r < 4; r++)
      b[r] = gmul(a[r], 8'h0e) ^ gmul(a[(r+1)%4], 8'h0b) ^
             gmul(a[(r+2)%4], 8'h0d) ^ gmul(a[(r+3)%4], 8'h09);
    return b;
  endfunction

  // Row r of the state is rotated left by r positions.
  function automatic state_t shift_rows(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[4*c + r] = s[4*((c + r) % 4) + r];
    return o;
  endfunction

  function automatic state_t inv_shift_rows(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[4*((c + r) % 4) + r] = s[4*c + r];
    return o;
  endfunction

endpackage
