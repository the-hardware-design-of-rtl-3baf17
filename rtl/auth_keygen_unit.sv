// auth_keygen_unit: round key generator x_i = f(a_i, x) for HB-MP and HB-MP+.
//
// The published protocols derive a fresh round key from the challenge a_i
// and the secret x, but the function f is not given.  This design uses a
// rotation, which is the usual choice for HB-MP:
//   HB-MP  (plus = 0): x_i = rotl(x, a_i[5:0])
//   HB-MP+ (plus = 1): x_i = rotl(x ^ a_i, a_i[5:0])
// The HB-MP+ variant mixes the challenge into the key so that the two
// protocols differ, as they do in the literature.
//
// Interface/timing: inputs are sampled when key_valid_in is high; one cycle
// later key_valid_out pulses and key_out holds x_i until the next request.
module auth_keygen_unit
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_valid_in,
  input  logic        plus,       // 1: HB-MP+, 0: HB-MP
  input  logic [63:0] key_in,     // x
  input  logic [63:0] challenge,  // a_i
  output logic [63:0] key_out,    // x_i
  output logic        key_valid_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_out       <= '0;
      key_valid_out <= 1'b0;
    end else begin
      key_valid_out <= key_valid_in;
      if (key_valid_in) key_out <= auth_round_key(key_in, challenge, plus);
    end
  end

endmodule
