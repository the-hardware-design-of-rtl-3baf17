// crypto_pkg: types and combinational helper functions shared by the
// encryption and authentication halves of the security core.
//
// Encryption side: the PRESENT 4-bit S-box, the S-box layer over 32 bits
// (one SBOX unit of the datapath), the 64-bit PRESENT bit permutation, the
// key-dependent 32-bit permutation used by the New cipher, and one step of
// the PRESENT-128 key schedule.  The S-box, the 64-bit permutation and the
// key schedule are those of the published PRESENT cipher (ISO/IEC 29192-2).
// The New cipher's permutation is this design's own choice: a fixed 32-bit
// spread (bit i -> 8*i mod 31, bit 31 fixed) followed by a left rotation by
// the five low key bits, which makes the permutation depend on the key as
// the algorithm requires.
//
// Authentication side: the algorithm selector and the HB-MP/HB-MP+ round
// key function f(a, x).
package crypto_pkg;

  // Encryption algorithm selector ("protocol" in the encryption datapath).
  typedef enum logic {
    ENC_PRESENT = 1'b0,
    ENC_NEW     = 1'b1
  } enc_alg_e;

  // Authentication algorithm selector ("protocol" in the authentication datapath).
  typedef enum logic [1:0] {
    AUTH_HB     = 2'd0,
    AUTH_HBP    = 2'd1,
    AUTH_HBMP   = 2'd2,
    AUTH_HBMPP  = 2'd3
  } auth_alg_e;

  localparam int unsigned PRESENT_ROUNDS = 31;
  localparam int unsigned NEW_ROUNDS     = 8;

  // PRESENT S-box: C 5 6 B 9 0 A D 3 E F 8 4 7 1 2
  function automatic logic [3:0] sbox4(input logic [3:0] x);
    unique case (x)
      4'h0: sbox4 = 4'hC;  4'h1: sbox4 = 4'h5;  4'h2: sbox4 = 4'h6;  4'h3: sbox4 = 4'hB;
      4'h4: sbox4 = 4'h9;  4'h5: sbox4 = 4'h0;  4'h6: sbox4 = 4'hA;  4'h7: sbox4 = 4'hD;
      4'h8: sbox4 = 4'h3;  4'h9: sbox4 = 4'hE;  4'hA: sbox4 = 4'hF;  4'hB: sbox4 = 4'h8;
      4'hC: sbox4 = 4'h4;  4'hD: sbox4 = 4'h7;  4'hE: sbox4 = 4'h1;  default: sbox4 = 4'h2;
    endcase
  endfunction

  // Eight S-boxes side by side over a 32-bit word.
  function automatic logic [31:0] sbox_layer32(input logic [31:0] x);
    logic [31:0] y;
    for (int n = 0; n < 8; n++) y[4*n +: 4] = sbox4(x[4*n +: 4]);
    return y;
  endfunction

  // PRESENT pLayer: bit i moves to 16*i mod 63, bit 63 stays.
  function automatic logic [63:0] present_player(input logic [63:0] x);
    logic [63:0] y;
    for (int i = 0; i < 63; i++) y[(16*i) % 63] = x[i];
    y[63] = x[63];
    return y;
  endfunction

  // New cipher permutation: bit i moves to 8*i mod 31 (bit 31 stays),
  // then the word is rotated left by k[4:0].
  function automatic logic [31:0] new_pbox(input logic [31:0] x, input logic [4:0] k);
    logic [31:0] y;
    for (int i = 0; i < 31; i++) y[(8*i) % 31] = x[i];
    y[31] = x[31];
    return (y << k) | (y >> (6'd32 - {1'b0, k}));
  endfunction

  // One step of the PRESENT-128 key schedule with round counter rc:
  // rotate left by 61, S-box the top two nibbles, XOR rc into bits 66..62.
  function automatic logic [127:0] present128_key_update(input logic [127:0] k,
                                                         input logic [4:0]   rc);
    logic [127:0] r;
    r = {k[66:0], k[127:67]};
    r[127:124] = sbox4(r[127:124]);
    r[123:120] = sbox4(r[123:120]);
    r[66:62]   = r[66:62] ^ rc;
    return r;
  endfunction

  // HB-MP / HB-MP+ round key x_i = f(a_i, x).
  // HB-MP : x rotated left by a[5:0].
  // HB-MP+: (x XOR a) rotated left by a[5:0].
  function automatic logic [63:0] auth_round_key(input logic [63:0] x,
                                                 input logic [63:0] a,
                                                 input logic        plus);
    logic [63:0] t;
    t = plus ? (x ^ a) : x;
    return (t << a[5:0]) | (t >> (7'd64 - {1'b0, a[5:0]}));
  endfunction

endpackage
