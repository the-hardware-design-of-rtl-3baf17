// tb_auth_comparator: feeds random candidates b, round keys x_i and targets z
// (with the true parity b.x_i as the comparator's parity input) and checks
// that b_out.x_i = z whenever x_i is non-zero, that b is changed only when
// needed and in one bit, and that fail is raised only for x_i = 0, z != 0.
module tb_auth_comparator;
  import tb_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, vin, z, parity, adjusted, fail, vout;
  logic [63:0] b, xi, b_out;
  int          checks = 0, failures = 0, n_adj = 0, n_keep = 0;

  always #5 clk = ~clk;

  auth_comparator dut (.clk(clk), .rst_n(rst_n), .com_valid_in(vin), .z(z), .parity(parity),
                       .b_in(b), .round_key(xi), .b_out(b_out), .adjusted(adjusted),
                       .fail(fail), .com_valid_out(vout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input logic [63:0] bb, input logic [63:0] kk, input logic zz);
    logic par;
    par = ref_dot(bb, kk);
    b = bb; xi = kk; z = zz; parity = par; vin = 1'b1;
    @(posedge clk); #1;
    vin = 1'b0;
    check(vout, "valid");
    if (kk != 0) begin
      check(ref_dot(b_out, kk) == zz, $sformatf("b_out.x = z (b %h x %h z %0b)", bb, kk, zz));
      check(fail == 1'b0, "no fail");
      if (par == zz) begin
        check(b_out == bb && !adjusted, "kept when equal");
        n_keep++;
      end else begin
        check($countones(b_out ^ bb) == 1 && adjusted, "one bit changed");
        n_adj++;
      end
    end else begin
      check(b_out == bb && fail == zz && !adjusted, "x_i = 0");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; vin = 1'b0; z = 0; parity = 0; b = '0; xi = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    apply(64'h5, 64'h0, 1'b1);
    apply(64'h5, 64'h0, 1'b0);
    apply(64'h0, 64'h8000_0000_0000_0000, 1'b1);
    for (int t = 0; t < 600; t++) apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    check(n_adj > 100 && n_keep > 100, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
