// tb_rand_bit_unit: checks the noise LFSR against a bit-serial reference for
// 500 random request patterns: ran_bit changes only on request, valid_out
// follows valid_in by one cycle, and the bits are roughly balanced.
module tb_rand_bit_unit;
  import tb_ref_pkg::*;

  localparam logic [31:0] SEED = 32'h1357_9BDF;
  logic        clk = 1'b0;
  logic        rst_n, vin, bit_o, vout;
  logic [31:0] model;
  int          checks = 0, failures = 0, ones = 0, reqs = 0;

  always #5 clk = ~clk;

  rand_bit_unit #(.SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .rbu_valid_in(vin),
                                    .ran_bit(bit_o), .rbu_valid_out(vout));

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
    check(bit_o == SEED[0] && !vout, "reset state");
    for (int t = 0; t < 500; t++) begin
      req = ($urandom % 3) != 0;
      vin = req;
      @(posedge clk); #1;
      if (req) begin
        model = ref_lfsr32(model);
        reqs++;
        if (bit_o) ones++;
      end
      check(vout == req, "valid_out follows valid_in");
      check(bit_o == model[0], $sformatf("bit at step %0d", t));
    end
    vin = 1'b0;
    check(ones > reqs / 4 && ones < 3 * reqs / 4, $sformatf("balance %0d of %0d", ones, reqs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
