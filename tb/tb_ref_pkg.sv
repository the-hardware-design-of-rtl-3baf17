// tb_ref_pkg: reference models used by the testbenches.
//
// Written separately from the RTL and in a different style (table lookups,
// inverse permutations, bit-serial LFSRs) so that a shared mistake is
// unlikely.  Models:
//   ref_present128  PRESENT with a 128-bit key, 31 rounds plus final key add
//   ref_new         the New Feistel cipher as specified in the README
//   ref_lfsr32 / ref_lfsr64   the noise and random-number generators
//   ref_dot, ref_rotl64, ref_round_key   authentication helpers
package tb_ref_pkg;

  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic logic [63:0] ref_sub64(input logic [63:0] x);
    logic [63:0] y;
    for (int n = 0; n < 16; n++) y[4*n +: 4] = SB[x[4*n +: 4]];
    return y;
  endfunction

  function automatic logic [31:0] ref_sub32(input logic [31:0] x);
    logic [31:0] y;
    for (int n = 0; n < 8; n++) y[4*n +: 4] = SB[x[4*n +: 4]];
    return y;
  endfunction

  // Output bit j takes input bit 4*j mod 63 (inverse of i -> 16*i mod 63).
  function automatic logic [63:0] ref_perm64(input logic [63:0] x);
    logic [63:0] y;
    for (int j = 0; j < 63; j++) y[j] = x[(4*j) % 63];
    y[63] = x[63];
    return y;
  endfunction

  function automatic logic [127:0] ref_key_next(input logic [127:0] k, input int rc);
    logic [255:0] kk;
    logic [127:0] r;
    kk = {k, k};
    r  = kk[255-61 -: 128];                 // rotate left by 61
    r[127:124] = SB[r[127:124]];
    r[123:120] = SB[r[123:120]];
    r[66:62]   = r[66:62] ^ 5'(rc);
    return r;
  endfunction

  function automatic logic [63:0] ref_present128(input logic [63:0] pt, input logic [127:0] key);
    logic [63:0]  s;
    logic [127:0] k;
    s = pt;
    k = key;
    for (int r = 1; r <= 31; r++) begin
      s = ref_perm64(ref_sub64(s ^ k[127:64]));
      k = ref_key_next(k, r);
    end
    return s ^ k[127:64];
  endfunction

  // Output bit 8*i mod 31 takes input bit i; then rotate left by k.
  function automatic logic [31:0] ref_pbox32(input logic [31:0] x, input int k);
    logic [31:0] y;
    logic [63:0] yy;
    for (int j = 0; j < 31; j++) y[j] = x[(4*j) % 31];   // 8*4 = 32 = 1 mod 31
    y[31] = x[31];
    yy = {y, y};
    return yy[63-k -: 32];
  endfunction

  function automatic logic [63:0] ref_new(input logic [63:0] pt, input logic [127:0] key);
    logic [31:0]  l, r, ka, kb;
    logic [127:0] k;
    l = pt[63:32];
    r = pt[31:0];
    k = key;
    for (int i = 1; i <= 8; i++) begin
      ka = k[79:48];
      kb = k[47:16];
      r  = r ^ ref_pbox32(ref_sub32(l ^ ka), int'(ka[4:0])) ^ ka;
      l  = l ^ ref_pbox32(ref_sub32(r ^ kb), int'(kb[4:0])) ^ kb;
      k  = ref_key_next(k, i);
    end
    return {l, r};
  endfunction

  function automatic logic [31:0] ref_lfsr32(input logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  function automatic logic [63:0] ref_lfsr64(input logic [63:0] s);
    logic [63:0] t;
    t = s;
    for (int n = 0; n < 64; n++) t = {t[62:0], t[63] ^ t[62] ^ t[60] ^ t[59]};
    return t;
  endfunction

  function automatic logic ref_dot(input logic [63:0] a, input logic [63:0] b);
    int ones;
    ones = 0;
    for (int i = 0; i < 64; i++) if (a[i] && b[i]) ones++;
    return ones[0];
  endfunction

  function automatic logic [63:0] ref_rotl64(input logic [63:0] x, input int n);
    logic [127:0] xx;
    xx = {x, x};
    return xx[127-n -: 64];
  endfunction

  function automatic logic [63:0] ref_round_key(input logic [63:0] x, input logic [63:0] a,
                                                input bit plus);
    return ref_rotl64(plus ? (x ^ a) : x, int'(a[5:0]));
  endfunction

endpackage
