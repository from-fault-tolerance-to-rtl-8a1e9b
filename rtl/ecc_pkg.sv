// ecc_pkg: the three byte codes of the design and the small arithmetic they
// use. "k*x" on an n-bit field is carry-less multiplication by the
// polynomial k truncated to n bits (2*x is a left shift that drops the top
// bit); with this reading every inverse in the decoders holds, e.g.
// (1+x)^-1 = 1+x+x^2+x^3 on nibbles.
//   RS1: data I = {I2,I1} (nibbles), redundancy R = {R2,R1},
//        R1 = I2 ^ I1, R2 = 2*I2 ^ I1. The map I -> R is one-to-one.
//   RS2: data I = {I3(2b), I2(3b), I1(3b)}, redundancy R = {R2,R1} (3b each),
//        R1 = I3 ^ I2 ^ I1, R2 = 4*I3 ^ 2*I2 ^ I1.
//   HC : Hamming (12,8), data bits at codeword positions 3,5,6,7,9,10,11,12,
//        check bits p[k] at position 2^k; this placement is this design's own.
package ecc_pkg;

  // How an RS1-protected datapath treats a byte whose redundancy disagrees:
  // GUARD_CHECK uses Check_Redundancy (flag, repair only when correctable),
  // GUARD_CORRECT uses Correct_Redundancy (always repair, never flag).
  typedef enum logic {
    GUARD_CHECK   = 1'b0,
    GUARD_CORRECT = 1'b1
  } guard_e;

  function automatic logic [3:0] m2_4(input logic [3:0] x);
    return {x[2:0], 1'b0};
  endfunction

  function automatic logic [2:0] m2_3(input logic [2:0] x);
    return {x[1:0], 1'b0};
  endfunction

  function automatic logic [2:0] m4_3(input logic [2:0] x);
    return {x[0], 2'b00};
  endfunction

  function automatic logic [7:0] rs1_enc(input logic [7:0] i);
    return {m2_4(i[7:4]) ^ i[3:0], i[7:4] ^ i[3:0]};
  endfunction

  function automatic logic [5:0] rs2_enc(input logic [7:0] i);
    logic [2:0] i3;
    i3 = {1'b0, i[7:6]};
    return {m4_3(i3) ^ m2_3(i[5:3]) ^ i[2:0], i3 ^ i[5:3] ^ i[2:0]};
  endfunction

  function automatic logic [3:0] hc_enc(input logic [7:0] d);
    logic [3:0] p;
    p[0] = d[0] ^ d[1] ^ d[3] ^ d[4] ^ d[6];
    p[1] = d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
    p[2] = d[1] ^ d[2] ^ d[3] ^ d[7];
    p[3] = d[4] ^ d[5] ^ d[6] ^ d[7];
    return p;
  endfunction

endpackage
