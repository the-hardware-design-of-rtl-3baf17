// crypto_core: integrated security core for constrained IoT devices.
//
// The core places a unified encryption unit (PRESENT-128 and the New
// lightweight cipher, enc_core) and a unified authentication unit (HB, HB+,
// HB-MP and HB-MP+, hb_auth) behind one set of data and control ports.
// One 128-bit key input serves both: the ciphers use all of it, the
// authentication protocols use key[127:64] as secret x and key[63:0] as
// secret y.  data_in carries the plaintext for encryption and the reader's
// challenge a_i for authentication.
//
// Control: a start pulse with sel_auth = 0 starts an encryption with
// enc_protocol, with sel_auth = 1 an authentication round with
// auth_protocol.  A start is taken only when neither unit is busy.  done
// pulses when the selected unit finishes; data_out then holds the ciphertext
// or the authentication response (auth_out of hb_auth) until the next
// operation completes.  Latencies: 31 cycles (PRESENT), 8 (New), 3 to 5
// (authentication).
//
// The split into the two units and the algorithm sets follow the published
// block diagram; the host-side interface shown there is not specified, so
// the plain start/done ports above are this design's own.
module crypto_core
  import crypto_pkg::*;
#(
  parameter logic [31:0] BIT_SEED = 32'hACE1_2468,
  parameter logic [63:0] NUM_SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         sel_auth,       // 0: encrypt, 1: authenticate
  input  enc_alg_e     enc_protocol,
  input  auth_alg_e    auth_protocol,
  input  logic [127:0] key,
  input  logic [63:0]  data_in,        // plaintext or challenge a_i
  output logic [63:0]  data_out,       // ciphertext or auth response
  output logic         z_out,          // HB response bit z_i
  output logic         b_adjusted,
  output logic         auth_fail,
  output logic         busy,
  output logic         done
);

  logic        enc_start, enc_busy, enc_done;
  logic        auth_start, auth_busy, auth_done;
  logic [63:0] ciphertext, auth_out;
  logic        last_auth;

  assign busy       = enc_busy || auth_busy;
  assign enc_start  = start && !busy && !sel_auth;
  assign auth_start = start && !busy &&  sel_auth;

  enc_core u_enc (
    .clk(clk), .rst_n(rst_n), .start(enc_start), .protocol(enc_protocol),
    .key(key), .plaintext(data_in),
    .ciphertext(ciphertext), .busy(enc_busy), .done(enc_done)
  );

  hb_auth #(.BIT_SEED(BIT_SEED), .NUM_SEED(NUM_SEED)) u_auth (
    .clk(clk), .rst_n(rst_n), .start(auth_start), .protocol(auth_protocol),
    .key1(key[127:64]), .key2(key[63:0]), .ran_num_in(data_in),
    .auth_out(auth_out), .z_out(z_out), .b_adjusted(b_adjusted),
    .fail(auth_fail), .busy(auth_busy), .done(auth_done)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)          last_auth <= 1'b0;
    else if (enc_start)  last_auth <= 1'b0;
    else if (auth_start) last_auth <= 1'b1;
  end

  assign done     = enc_done || auth_done;
  assign data_out = last_auth ? auth_out : ciphertext;

endmodule
