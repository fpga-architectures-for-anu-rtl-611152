// anu_pkg: constants and combinational round functions of the ANU block
// cipher (64-bit block, 128-bit key, Feistel structure).
//
// The cipher is referenced by name only; its internals here follow the
// published ANU definition: 25 rounds, each computing
//   f = S(L <<< 3) ^ S(L >>> 8) ^ R ^ RK
// on the 32-bit halves and then applying the 32-bit block permutation BP to
// both halves with a half swap. The 128-bit key register is rotated left by
// 13, its two low nibbles pass the S-box and the 5-bit round counter is
// XORed into bits 63:59; the round key is the low 32 bits of the register
// before the update. These constants are this design's reading of the ANU
// definition and have not been checked against official test vectors.
package anu_pkg;

  localparam int unsigned ANU_ROUNDS   = 25;
  // Two rounds are unrolled per clock, so 25 rounds take 13 clocks.
  localparam int unsigned ANU_CYCLES   = (ANU_ROUNDS + 1) / 2;

  localparam logic [3:0] ANU_SBOX [16] = '{
    4'h2, 4'h9, 4'h7, 4'hE, 4'h1, 4'hC, 4'hA, 4'h0,
    4'h4, 4'h3, 4'h8, 4'hD, 4'hF, 4'h6, 4'h5, 4'hB
  };

  localparam logic [3:0] ANU_SBOX_INV [16] = '{
    4'h7, 4'h4, 4'h0, 4'h9, 4'h8, 4'hE, 4'hD, 4'h2,
    4'hA, 4'h1, 4'h6, 4'hF, 4'h5, 4'hB, 4'h3, 4'hC
  };

  // Bit i of the input moves to bit ANU_BP[i] of the output.
  localparam int unsigned ANU_BP [32] = '{
    20, 16, 28, 24, 17, 21, 25, 29, 22, 18, 30, 26, 19, 23, 27, 31,
    11, 15,  3,  7, 14, 10,  6,  2,  9, 13,  1,  5, 12,  8,  4,  0
  };

  function automatic logic [31:0] anu_sbox32(input logic [31:0] x);
    logic [31:0] y;
    for (int n = 0; n < 8; n++) y[4*n +: 4] = ANU_SBOX[x[4*n +: 4]];
    return y;
  endfunction

  function automatic logic [31:0] anu_perm(input logic [31:0] x);
    logic [31:0] y;
    for (int i = 0; i < 32; i++) y[ANU_BP[i]] = x[i];
    return y;
  endfunction

  function automatic logic [31:0] anu_perm_inv(input logic [31:0] x);
    logic [31:0] y;
    for (int i = 0; i < 32; i++) y[i] = x[ANU_BP[i]];
    return y;
  endfunction

  // One Feistel round: state = {L, R}.
  function automatic logic [63:0] anu_round(input logic [63:0] s,
                                            input logic [31:0] rk);
    logic [31:0] l, r, f;
    l = s[63:32];
    r = s[31:0];
    f = anu_sbox32({l[28:0], l[31:29]}) ^ anu_sbox32({l[7:0], l[31:8]}) ^ r ^ rk;
    return {anu_perm(f), anu_perm(l)};
  endfunction

  // Key register update after round rc (1..25).
  function automatic logic [127:0] anu_key_update(input logic [127:0] k,
                                                  input logic [4:0]   rc);
    logic [127:0] n;
    n = {k[114:0], k[127:115]};
    n[3:0] = ANU_SBOX[n[3:0]];
    n[7:4] = ANU_SBOX[n[7:4]];
    n[63:59] = n[63:59] ^ rc;
    return n;
  endfunction

  // Inverse of anu_round under the same round key.
  function automatic logic [63:0] anu_round_inv(input logic [63:0] s,
                                                input logic [31:0] rk);
    logic [31:0] l, f;
    l = anu_perm_inv(s[31:0]);
    f = anu_perm_inv(s[63:32]);
    return {l, f ^ anu_sbox32({l[28:0], l[31:29]}) ^ anu_sbox32({l[7:0], l[31:8]}) ^ rk};
  endfunction

  // Inverse of anu_key_update for the same round counter.
  function automatic logic [127:0] anu_key_update_inv(input logic [127:0] k,
                                                      input logic [4:0]   rc);
    logic [127:0] n;
    n = k;
    n[63:59] = n[63:59] ^ rc;
    n[7:4] = ANU_SBOX_INV[n[7:4]];
    n[3:0] = ANU_SBOX_INV[n[3:0]];
    return {n[12:0], n[127:13]};
  endfunction

endpackage
