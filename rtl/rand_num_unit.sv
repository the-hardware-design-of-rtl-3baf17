// rand_num_unit: 64-bit random number generator for the HB-family protocols.
//
// A 64-bit Fibonacci LFSR (polynomial x^64 + x^63 + x^61 + x^60 + 1, taps at
// bits 63, 62, 60, 59, shifting towards the MSB) is advanced by 64 steps per
// request, unrolled into one clock cycle, so that every number delivered is
// made of 64 fresh LFSR bits rather than the previous number shifted by one.
// The use of an LFSR is from the published architecture; the polynomial,
// the 64-step advance and the seed are this design's choices.
//
// Interface/timing: a one-cycle pulse on rnu_valid_in requests a number; in
// the next cycle rnu_valid_out pulses and ran_num holds the new number until
// the next request.  On reset the LFSR takes SEED (must be non-zero).
module rand_num_unit #(
  parameter logic [63:0] SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rnu_valid_in,
  output logic [63:0] ran_num,
  output logic        rnu_valid_out
);

  logic [63:0] advanced;

  always_comb begin
    advanced = ran_num;
    for (int s = 0; s < 64; s++)
      advanced = {advanced[62:0], advanced[63] ^ advanced[62] ^ advanced[60] ^ advanced[59]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ran_num       <= SEED;
      rnu_valid_out <= 1'b0;
    end else begin
      rnu_valid_out <= rnu_valid_in;
      if (rnu_valid_in) ran_num <= advanced;
    end
  end

endmodule
