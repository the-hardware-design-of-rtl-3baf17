// tb_enc_core: checks the unified encryption unit.
// PRESENT-128: the published all-zero test vector (ciphertext
// 96db702a2e6900af) and random vectors against the reference model; New:
// random vectors against the reference model.  It also checks that busy
// lasts exactly 31 (PRESENT) or 8 (New) cycles, that a start while busy is
// ignored and that the ciphertext holds after done.
module tb_enc_core;
  import tb_ref_pkg::*;
  import crypto_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n, start, busy, done;
  enc_alg_e     protocol;
  logic [127:0] key;
  logic [63:0]  pt, ct;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  enc_core dut (.clk(clk), .rst_n(rst_n), .start(start), .protocol(protocol), .key(key),
                .plaintext(pt), .ciphertext(ct), .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic encrypt(input enc_alg_e alg, input logic [127:0] k, input logic [63:0] p,
                         input logic [63:0] exp, input bit poke_busy);
    int cycles;
    protocol = alg; key = k; pt = p; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      if (poke_busy && cycles == 3) begin
        // a start while busy must be ignored
        start = 1'b1; pt = ~p; key = ~k; protocol = (alg == ENC_NEW) ? ENC_PRESENT : ENC_NEW;
      end else begin
        start = 1'b0;
      end
      @(posedge clk); #1;
      cycles++;
    end
    start = 1'b0;
    check(cycles == ((alg == ENC_PRESENT) ? 31 : 8),
          $sformatf("%s latency %0d cycles", alg.name(), cycles));
    check(ct == exp, $sformatf("%s ct %h expected %h", alg.name(), ct, exp));
    check(!busy, "busy low at done");
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(ct == exp && !done, "ciphertext held, done is one pulse");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k;
    logic [63:0]  p;
    rst_n = 1'b0; start = 1'b0; protocol = ENC_PRESENT; key = '0; pt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    encrypt(ENC_PRESENT, '0, '0, 64'h96db702a2e6900af, 1'b0);
    check(ref_present128('0, '0) == 64'h96db702a2e6900af, "reference model vector");
    for (int t = 0; t < 30; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom};
      encrypt(ENC_PRESENT, k, p, ref_present128(p, k), t == 3);
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom};
      encrypt(ENC_NEW, k, p, ref_new(p, k), t == 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
