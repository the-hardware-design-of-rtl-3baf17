// auth_comparator: makes the HB-MP response b_i satisfy b_i . x_i = z_i.
//
// It compares the dot product of a random candidate b with the round key x_i
// (parity, computed by the dot product unit) against the target bit z.  If
// they agree, b is passed on.  If not, the lowest bit of b at which x_i is 1
// is inverted, which flips the parity and so satisfies the equation in one
// step instead of redrawing random numbers.  If x_i is zero no b can satisfy
// z = 1; the candidate is then passed on and `fail` is raised.  The
// published architecture names a comparator in this place; the one-step
// correction is this design's choice.
//
// Interface/timing: inputs are sampled when com_valid_in is high; one cycle
// later com_valid_out pulses and b_out, adjusted and fail hold until the
// next request.
module auth_comparator (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        com_valid_in,
  input  logic        z,          // target bit z_i
  input  logic        parity,     // b . x_i
  input  logic [63:0] b_in,       // candidate b
  input  logic [63:0] round_key,  // x_i
  output logic [63:0] b_out,
  output logic        adjusted,   // b was modified
  output logic        fail,       // equation cannot be satisfied
  output logic        com_valid_out
);

  logic [63:0] lowest_one;
  logic        mismatch;

  assign lowest_one = round_key & (~round_key + 64'd1);
  assign mismatch   = (parity != z);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_out         <= '0;
      adjusted      <= 1'b0;
      fail          <= 1'b0;
      com_valid_out <= 1'b0;
    end else begin
      com_valid_out <= com_valid_in;
      if (com_valid_in) begin
        b_out    <= mismatch ? (b_in ^ lowest_one) : b_in;
        adjusted <= mismatch && (round_key != '0);
        fail     <= mismatch && (round_key == '0);
      end
    end
  end

endmodule
