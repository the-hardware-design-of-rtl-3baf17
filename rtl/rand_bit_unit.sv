// rand_bit_unit: noise bit generator for the HB-family protocols.
//
// A 32-bit Fibonacci LFSR (polynomial x^32 + x^22 + x^2 + x + 1, taps at
// bits 31, 21, 1, 0, shifting towards the MSB) produces the noise bit v_i.
// That the noise comes from an LFSR is from the published architecture; the
// polynomial, the width and the seed are this design's choices.
//
// Interface/timing: a one-cycle pulse on rbu_valid_in advances the LFSR by
// one step; in the next cycle rbu_valid_out pulses and ran_bit holds the
// newly shifted-in bit until the next request.  On reset the LFSR takes SEED
// (must be non-zero).
module rand_bit_unit #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rbu_valid_in,
  output logic ran_bit,
  output logic rbu_valid_out
);

  logic [31:0] lfsr;
  logic        feedback;

  assign feedback = lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0];
  assign ran_bit  = lfsr[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr          <= SEED;
      rbu_valid_out <= 1'b0;
    end else begin
      rbu_valid_out <= rbu_valid_in;
      if (rbu_valid_in) lfsr <= {lfsr[30:0], feedback};
    end
  end

endmodule
