// enc_core: unified encryption unit for PRESENT-128 and the New cipher.
//
// One round is computed per clock cycle on a 64-bit state held in two 32-bit
// registers, dreg_msb and dreg_lsb.  Two S-box units (SBOX1 on the upper
// word, SBOX2 on the lower word) and the permutation logic are shared by both
// algorithms; multiplexers steered by `protocol` choose the data and the key
// slices that reach them.
//
//  PRESENT (31 rounds, SP network): state ^= kreg[127:64]; SBOX1/SBOX2 on the
//    two halves; 64-bit PRESENT bit permutation.  After round 31 the output
//    is the state XORed with the 32nd round key kreg[127:64].
//  New (8 rounds, Feistel): each round has two stages.
//    stage 1: t = P(SBOX1(msb ^ ka), ka) ^ ka;  lsb' = lsb ^ t
//    stage 2: u = P(SBOX2(lsb' ^ kb), kb) ^ kb; msb' = msb ^ u
//    with ka = kreg[79:48], kb = kreg[47:16] and P the key-dependent 32-bit
//    permutation new_pbox.  The ciphertext is {dreg_msb, dreg_lsb}.
//
// The round counts, block and key sizes, register names, SBOX units and the
// key slices kreg[127:96] and kreg[79:48] on the SBOX1 key mux come from the
// published architecture.  The New cipher's inner S-box, permutation, stage
// wiring and key schedule are not published in full; the choices above are
// this design's own, so New ciphertexts will not match other implementations.
//
// Interface/timing: `start` is accepted when busy is low; it loads plaintext
// and key.  busy stays high for exactly 31 (PRESENT) or 8 (New) cycles, one
// per round; `done` pulses for one cycle in the cycle after the last round,
// and `ciphertext` stays valid until the next start.  Synchronous
// active-low reset.
module enc_core
  import crypto_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  enc_alg_e     protocol,
  input  logic [127:0] key,
  input  logic [63:0]  plaintext,
  output logic [63:0]  ciphertext,
  output logic         busy,
  output logic         done
);

  logic [31:0]  dreg_msb, dreg_lsb;
  logic [127:0] kreg;
  logic [4:0]   round;       // round being computed, 1-based
  enc_alg_e     alg_q;
  logic         accept;
  logic         last_round;

  // Round datapath
  logic [31:0] sbox1_in, sbox1_out, sbox2_in, sbox2_out;
  logic [31:0] key_a, key_b;            // key slices on the SBOX1 / SBOX2 paths
  logic [31:0] stage1_lsb, stage2_msb;  // New cipher stage results
  logic [63:0] player_out;
  logic [31:0] next_msb, next_lsb;

  assign accept     = start && !busy;
  assign last_round = (alg_q == ENC_PRESENT) ? (round == 5'(PRESENT_ROUNDS))
                                             : (round == 5'(NEW_ROUNDS));

  always_comb begin
    key_a      = (alg_q == ENC_NEW) ? kreg[79:48] : kreg[127:96];
    key_b      = (alg_q == ENC_NEW) ? kreg[47:16] : kreg[95:64];
    sbox1_in   = dreg_msb ^ key_a;
    sbox1_out  = sbox_layer32(sbox1_in);
    stage1_lsb = dreg_lsb ^ new_pbox(sbox1_out, key_a[4:0]) ^ key_a;
    sbox2_in   = ((alg_q == ENC_NEW) ? stage1_lsb : dreg_lsb) ^ key_b;
    sbox2_out  = sbox_layer32(sbox2_in);
    stage2_msb = dreg_msb ^ new_pbox(sbox2_out, key_b[4:0]) ^ key_b;
    player_out = present_player({sbox1_out, sbox2_out});
    if (alg_q == ENC_NEW) begin
      next_msb = stage2_msb;
      next_lsb = stage1_lsb;
    end else begin
      next_msb = player_out[63:32];
      next_lsb = player_out[31:0];
    end
  end

  enc_keygen u_keygen (
    .clk  (clk),
    .rst_n(rst_n),
    .load (accept),
    .key  (key),
    .step (busy),
    .rc   (round),
    .kreg (kreg)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dreg_msb <= '0;
      dreg_lsb <= '0;
      round    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      alg_q    <= ENC_PRESENT;
    end else begin
      done <= 1'b0;
      if (accept) begin
        dreg_msb <= plaintext[63:32];
        dreg_lsb <= plaintext[31:0];
        round    <= 5'd1;
        busy     <= 1'b1;
        alg_q    <= protocol;
      end else if (busy) begin
        dreg_msb <= next_msb;
        dreg_lsb <= next_lsb;
        round    <= round + 5'd1;
        if (last_round) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ciphertext = (alg_q == ENC_PRESENT) ? ({dreg_msb, dreg_lsb} ^ kreg[127:64])
                                             : {dreg_msb, dreg_lsb};

endmodule
