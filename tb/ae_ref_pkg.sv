// ae_ref_pkg: reference model used by the testbenches. It computes the ANU
// cipher, the PHOTON-based hash and the two authenticated-encryption modes
// in a plain, non-iterative form, written separately from the RTL (whole
// cipher in one loop, S-boxes as packed constants, the bit permutation
// applied through its inverse, MixColumns as one precomputed 5x5 matrix
// over GF(2^4)), so that the testbenches compare the hardware with values
// obtained another way.
package ae_ref_pkg;

  // S-box entry v is bits 4*(15-v)+3 : 4*(15-v) of these constants.
  localparam logic [63:0] ANU_S = 64'h297E_1CA0_438D_F65B;
  localparam logic [63:0] PRS_S = 64'hC56B_90AD_3EF8_4712;

  function automatic logic [3:0] sb(input logic [63:0] tab, input logic [3:0] v);
    return tab[4*(15 - v) +: 4];
  endfunction

  // Output bit j of the ANU permutation comes from input bit INV[j].
  function automatic logic [31:0] anu_bp_ref(input logic [31:0] x);
    int unsigned fwd [32] = '{20, 16, 28, 24, 17, 21, 25, 29, 22, 18, 30, 26, 19, 23, 27, 31,
                              11, 15,  3,  7, 14, 10,  6,  2,  9, 13,  1,  5, 12,  8,  4,  0};
    int unsigned inv [32];
    logic [31:0] y;
    for (int i = 0; i < 32; i++) inv[fwd[i]] = i;
    for (int j = 0; j < 32; j++) y[j] = x[inv[j]];
    return y;
  endfunction

  function automatic logic [31:0] anu_s32_ref(input logic [31:0] x);
    logic [31:0] y;
    for (int n = 0; n < 8; n++) y[4*n +: 4] = sb(ANU_S, x[4*n +: 4]);
    return y;
  endfunction

  // Round key of round r (1..25) of key k.
  function automatic logic [31:0] anu_rk_ref(input logic [127:0] key, input int r);
    logic [127:0] k;
    k = key;
    for (int i = 1; i < r; i++) begin
      k = (k << 13) | (k >> 115);
      k[7:0] = {sb(ANU_S, k[7:4]), sb(ANU_S, k[3:0])};
      k[63:59] ^= 5'(i);
    end
    return k[31:0];
  endfunction

  function automatic logic [63:0] anu_ref(input logic [127:0] key, input logic [63:0] pt);
    logic [31:0] l, r, f;
    l = pt[63:32];
    r = pt[31:0];
    for (int i = 1; i <= 25; i++) begin
      f = anu_s32_ref((l << 3) | (l >> 29)) ^ anu_s32_ref((l >> 8) | (l << 24))
          ^ r ^ anu_rk_ref(key, i);
      r = anu_bp_ref(l);
      l = anu_bp_ref(f);
    end
    return {l, r};
  endfunction

  // GF(2^4) multiply: carry-less product, then reduction by x^4 + x + 1.
  function automatic logic [3:0] gmul(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'b0010011 << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [99:0] photon_perm_ref(input logic [99:0] s);
    logic [3:0] rc [12] = '{1, 3, 7, 14, 13, 11, 6, 12, 9, 2, 5, 10};
    logic [3:0] ic [5]  = '{0, 1, 3, 6, 4};
    logic [3:0] a [5][5];
    logic [3:0] m [5][5];
    logic [3:0] t [5][5];
    logic [3:0] c [5][5];
    logic [3:0] acc;
    logic [99:0] y;
    // A: shift up, last row (1,2,9,9,2); M = A^5.
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) a[i][j] = (j == i + 1) ? 4'd1 : 4'd0;
    a[4][0] = 1; a[4][1] = 2; a[4][2] = 9; a[4][3] = 9; a[4][4] = 2;
    m = a;
    for (int p = 1; p < 5; p++) begin
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
        acc = 0;
        for (int k = 0; k < 5; k++) acc ^= gmul(a[i][k], m[k][j]);
        t[i][j] = acc;
      end
      m = t;
    end
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) c[i][j] = s[4*(24 - 5*i - j) +: 4];
    for (int r = 0; r < 12; r++) begin
      for (int i = 0; i < 5; i++) c[i][0] ^= rc[r] ^ ic[i];
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) c[i][j] = sb(PRS_S, c[i][j]);
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) t[i][(j + 5 - i) % 5] = c[i][j];
      for (int j = 0; j < 5; j++) for (int i = 0; i < 5; i++) begin
        acc = 0;
        for (int k = 0; k < 5; k++) acc ^= gmul(m[i][k], t[k][j]);
        c[i][j] = acc;
      end
    end
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) y[4*(24 - 5*i - j) +: 4] = c[i][j];
    return y;
  endfunction

  // Sponge: 148-bit input, pad 1 0*, three 52-bit blocks into the top bits.
  function automatic logic [99:0] photon_hash_ref(input logic [147:0] d);
    logic [155:0] pm;
    logic [99:0] s;
    pm = {d, 8'h80};
    s = 100'h19_34_34;
    for (int b = 0; b < 3; b++) begin
      s[99:48] ^= pm[155 - 52*b -: 52];
      s = photon_perm_ref(s);
    end
    return s;
  endfunction

  typedef struct {
    logic [63:0] ct;      // ciphertext of the message
    logic [99:0] tag;     // hash value
    logic [63:0] ct_h0;   // MtE: encrypted hash bits 63:0
    logic [63:0] ct_h1;   // MtE: encrypted hash bits 99:64, zero padded
  } ae_out_t;

  function automatic ae_out_t etm_ref(input logic [127:0] key, input logic [63:0] msg);
    ae_out_t o;
    o.ct    = anu_ref(key, msg);
    o.tag   = photon_hash_ref({84'd0, o.ct});
    o.ct_h0 = '0;
    o.ct_h1 = '0;
    return o;
  endfunction

  function automatic ae_out_t mte_ref(input logic [127:0] key, input logic [63:0] msg);
    ae_out_t o;
    o.ct    = anu_ref(key, msg);
    o.tag   = photon_hash_ref({84'd0, msg});
    o.ct_h0 = anu_ref(key, o.tag[63:0]);
    o.ct_h1 = anu_ref(key, {28'd0, o.tag[99:64]});
    return o;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
