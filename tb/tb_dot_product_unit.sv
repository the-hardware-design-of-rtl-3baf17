// tb_dot_product_unit: checks the GF(2) dot product against a counting
// reference for directed and 1000 random operand pairs, and that the result
// holds while dot_valid_in is low.
module tb_dot_product_unit;
  import tb_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, vin, dot, vout;
  logic [63:0] a, b;
  logic        exp_dot;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  dot_product_unit dut (.clk(clk), .rst_n(rst_n), .dot_valid_in(vin), .key(a), .random(b),
                        .dot(dot), .dot_valid_out(vout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input logic [63:0] x, input logic [63:0] y);
    a = x; b = y; vin = 1'b1;
    @(posedge clk); #1;
    vin = 1'b0;
    exp_dot = ref_dot(x, y);
    check(vout && dot == exp_dot, $sformatf("dot(%h,%h)=%0b", x, y, dot));
    a = ~x; b = y;
    @(posedge clk); #1;
    check(!vout && dot == exp_dot, "hold");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; vin = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    apply('1, '1);
    apply(64'h1, 64'h1);
    apply(64'h8000_0000_0000_0001, '1);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    for (int t = 0; t < 1000; t++) apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
