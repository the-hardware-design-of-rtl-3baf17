// enc_keygen: round key register (kreg) and key generation for the unified
// encryption datapath.
//
// kreg holds the 128-bit key state.  A load copies the user key into it; each
// step applies one round of the PRESENT-128 key schedule with round counter
// rc (rotate left by 61, S-box on bits 127..120, rc XORed into bits 66..62).
// PRESENT takes its round key from kreg[127:64]; the New cipher takes its two
// 32-bit stage keys from other slices of the same register, so both ciphers
// share this one key generator.  Using the PRESENT-128 schedule for the New
// cipher as well is this design's choice.
//
// Interface: load has priority over step.  kreg is updated on the rising edge
// of clk; the reset state is all zeros (active-low synchronous reset).
module enc_keygen
  import crypto_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // copy key into kreg
  input  logic [127:0] key,
  input  logic         step,   // advance the schedule by one round
  input  logic [4:0]   rc,     // round counter of the round being completed
  output logic [127:0] kreg
);

  always_ff @(posedge clk) begin
    if (!rst_n)    kreg <= '0;
    else if (load) kreg <= key;
    else if (step) kreg <= present128_key_update(kreg, rc);
  end

endmodule
