// tb_encrypt_time: runs the security core on a 100 kHz clock (10 us period)
// and measures the wall-clock time of one block encryption, from the clock
// edge that accepts start to the edge that raises done.  Expected: 310 us
// for PRESENT-128 and 80 us for the New cipher.  Each ciphertext is also
// compared with the reference models.
module tb_encrypt_time;
  timeunit 1us;
  timeprecision 1ns;
  import tb_ref_pkg::*;
  import crypto_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n, start, z_out, b_adj, afail, busy, done;
  enc_alg_e     enc_p;
  logic [127:0] key;
  logic [63:0]  din, dout;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;   // 10 us period = 100 kHz

  crypto_core dut (
    .clk(clk), .rst_n(rst_n), .start(start), .sel_auth(1'b0), .enc_protocol(enc_p),
    .auth_protocol(AUTH_HB), .key(key), .data_in(din), .data_out(dout), .z_out(z_out),
    .b_adjusted(b_adj), .auth_fail(afail), .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic timed(input enc_alg_e alg, input realtime expect_us);
    realtime t0, t1;
    logic [63:0] e;
    enc_p = alg; key = {$urandom, $urandom, $urandom, $urandom}; din = {$urandom, $urandom};
    start = 1'b1;
    @(posedge clk);
    t0 = $realtime;
    #1 start = 1'b0;
    @(posedge done);
    t1 = $realtime;
    e = (alg == ENC_PRESENT) ? ref_present128(din, key) : ref_new(din, key);
    $display("%s: %0.1f us", alg.name(), t1 - t0);
    check(t1 - t0 == expect_us, $sformatf("%s took %0.1f us, expected %0.1f", alg.name(),
                                          t1 - t0, expect_us));
    check(dout == e, $sformatf("%s ciphertext", alg.name()));
    @(posedge clk); #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; enc_p = ENC_PRESENT; key = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      timed(ENC_PRESENT, 310.0);
      timed(ENC_NEW, 80.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
