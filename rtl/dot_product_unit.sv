// dot_product_unit: binary inner product of two 64-bit vectors.
//
// dot = ^(key & random): a bitwise AND followed by an XOR reduction, which is
// the dot product over GF(2) used by every HB-family protocol.  The equation
// is the published one; the registered output and the valid handshake are
// this design's choice.
//
// Interface/timing: operands are sampled when dot_valid_in is high; one
// cycle later dot_valid_out pulses and dot holds the result until the next
// request.
module dot_product_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dot_valid_in,
  input  logic [63:0] key,
  input  logic [63:0] random,
  output logic        dot,
  output logic        dot_valid_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dot           <= 1'b0;
      dot_valid_out <= 1'b0;
    end else begin
      dot_valid_out <= dot_valid_in;
      if (dot_valid_in) dot <= ^(key & random);
    end
  end

endmodule
