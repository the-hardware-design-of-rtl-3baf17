// tb_rand_num_unit: checks the 64-bit random number generator against a
// bit-serial reference (64 LFSR steps per request) for 300 random request
// patterns, the one-cycle valid handshake, and that two successive numbers
// are not shifted copies of each other.
module tb_rand_num_unit;
  import tb_ref_pkg::*;

  localparam logic [63:0] SEED = 64'hFEDC_BA98_7654_3210;
  logic        clk = 1'b0;
  logic        rst_n, vin, vout;
  logic [63:0] num, model, prev;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  rand_num_unit #(.SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .rnu_valid_in(vin),
                                    .ran_num(num), .rnu_valid_out(vout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit req;
    rst_n = 1'b0; vin = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model = SEED;
    check(num == SEED && !vout, "reset state");
    for (int t = 0; t < 300; t++) begin
      req = ($urandom % 2) != 0;
      vin = req;
      prev = num;
      @(posedge clk); #1;
      if (req) begin
        model = ref_lfsr64(model);
        check(num[62:0] != prev[63:1] && num[63:1] != prev[62:0], "not a one-step shift");
      end
      check(vout == req, "valid_out follows valid_in");
      check(num == model, $sformatf("number at step %0d: %h vs %h", t, num, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
