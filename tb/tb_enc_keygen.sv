// tb_enc_keygen: checks the 128-bit key register against the PRESENT-128
// key schedule reference for 20 random keys over 31 steps, that load wins
// over step, and that the register holds when neither is asserted.
module tb_enc_keygen;
  import tb_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         load, step;
  logic [127:0] key, kreg, expect_k;
  logic [4:0]   rc;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  enc_keygen dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .step(step), .rc(rc), .kreg(kreg));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    rst_n = 1'b0; load = 1'b0; step = 1'b0; key = '0; rc = '0;
    @(posedge clk); @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      load = 1'b1; step = (t % 2 == 1);   // load has priority
      @(posedge clk); #1;
      load = 1'b0; step = 1'b0;
      check(kreg, key, "load");
      expect_k = key;
      for (int r = 1; r <= 31; r++) begin
        rc = 5'(r); step = 1'b1;
        @(posedge clk); #1;
        expect_k = ref_key_next(expect_k, r);
        check(kreg, expect_k, $sformatf("round %0d", r));
      end
      step = 1'b0;
      @(posedge clk); #1;
      check(kreg, expect_k, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
