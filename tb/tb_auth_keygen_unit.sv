// tb_auth_keygen_unit: checks x_i = f(a_i, x) for HB-MP (rotation) and
// HB-MP+ (XOR then rotation) against the reference for directed rotation
// amounts 0, 1, 63 and 500 random cases, and the valid handshake.
module tb_auth_keygen_unit;
  import tb_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, vin, plus, vout;
  logic [63:0] x, a, xi;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  auth_keygen_unit dut (.clk(clk), .rst_n(rst_n), .key_valid_in(vin), .plus(plus), .key_in(x),
                        .challenge(a), .key_out(xi), .key_valid_out(vout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input logic [63:0] xx, input logic [63:0] aa, input bit p);
    logic [63:0] e;
    x = xx; a = aa; plus = p; vin = 1'b1;
    @(posedge clk); #1;
    vin = 1'b0;
    e = ref_round_key(xx, aa, p);
    check(vout && xi == e, $sformatf("f(%h,%h,%0b)=%h expected %h", aa, xx, p, xi, e));
    x = ~xx;
    @(posedge clk); #1;
    check(!vout && xi == e, "hold");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; vin = 1'b0; plus = 1'b0; x = '0; a = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    apply(64'h0000_0000_0000_0001, 64'h0, 1'b0);
    apply(64'h0000_0000_0000_0001, 64'h1, 1'b0);
    check(xi == 64'h2, "rotate by one");
    apply(64'h0000_0000_0000_0001, 64'h3F, 1'b0);
    check(xi == 64'h8000_0000_0000_0000, "rotate by 63");
    apply(64'h0123_4567_89AB_CDEF, 64'h0123_4567_89AB_CDEF, 1'b1);
    check(xi == 64'h0, "HB-MP+ with a = x");
    for (int t = 0; t < 500; t++) apply({$urandom, $urandom}, {$urandom, $urandom}, t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
