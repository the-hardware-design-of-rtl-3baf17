// tb_crypto_core: end-to-end test of the security core at its default
// parameters.  It interleaves random encryptions (PRESENT-128 and New) and
// authentication rounds (HB, HB+, HB-MP, HB-MP+) through the shared ports,
// checks every result and latency against the reference models, and counts
// how often each mechanism happened: each of the six algorithms, a start
// ignored while busy, a noise bit of 1, an HB-MP response kept and one
// adjusted by the comparator, and an unsatisfiable round (x_i = 0).  A
// mechanism that never happened counts as a failure.
module tb_crypto_core;
  import tb_ref_pkg::*;
  import crypto_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n, start, sel_auth, z_out, b_adj, afail, busy, done;
  enc_alg_e     enc_p;
  auth_alg_e    auth_p;
  logic [127:0] key;
  logic [63:0]  din, dout;
  logic [31:0]  bit_model;
  logic [63:0]  num_model;
  int           checks = 0, failures = 0;
  int           n_alg [6];
  int           n_ignored = 0, n_noise = 0, n_keep = 0, n_adj = 0, n_fail = 0;

  always #5 clk = ~clk;

  crypto_core dut (
    .clk(clk), .rst_n(rst_n), .start(start), .sel_auth(sel_auth), .enc_protocol(enc_p),
    .auth_protocol(auth_p), .key(key), .data_in(din), .data_out(dout), .z_out(z_out),
    .b_adjusted(b_adj), .auth_fail(afail), .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Issue one operation; optionally try to start another one while busy.
  task automatic issue(input bit auth, input int alg, input logic [127:0] k,
                       input logic [63:0] d, output int cycles, input bit poke);
    sel_auth = auth; enc_p = enc_alg_e'(alg[0]); auth_p = auth_alg_e'(alg[1:0]);
    key = k; din = d; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      if (poke && cycles == 1) begin
        start = 1'b1; sel_auth = ~auth; din = ~d;
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(posedge clk); #1;
      cycles++;
    end
    start = 1'b0;
  endtask

  task automatic encrypt(input enc_alg_e alg, input bit poke);
    logic [127:0] k;
    logic [63:0]  p, e;
    int           cycles;
    k = {$urandom, $urandom, $urandom, $urandom};
    p = {$urandom, $urandom};
    issue(1'b0, int'(alg), k, p, cycles, poke);
    e = (alg == ENC_PRESENT) ? ref_present128(p, k) : ref_new(p, k);
    check(dout == e, $sformatf("%s ct %h expected %h", alg.name(), dout, e));
    check(cycles == ((alg == ENC_PRESENT) ? 31 : 8), $sformatf("%s latency %0d", alg.name(), cycles));
    n_alg[int'(alg)]++;
  endtask

  task automatic authenticate(input auth_alg_e alg, input logic [127:0] k, input logic [63:0] aa,
                              input bit poke);
    logic        v, z;
    logic [63:0] b, xi, e;
    int          cycles;
    issue(1'b1, int'(alg), k, aa, cycles, poke);
    bit_model = ref_lfsr32(bit_model);
    v = bit_model[0];
    if (alg != AUTH_HB) num_model = ref_lfsr64(num_model);
    b = num_model;
    z = ref_dot(k[127:64], aa) ^ v;
    if (alg == AUTH_HBP) z ^= ref_dot(k[63:0], b);
    check(z_out == z, $sformatf("%s z", alg.name()));
    unique case (alg)
      AUTH_HB:  begin check(dout == {63'b0, z}, "HB out"); check(cycles == 3, "HB latency"); end
      AUTH_HBP: begin check(dout == b, "HB+ out"); check(cycles == 4, "HB+ latency"); end
      default: begin
        xi = ref_round_key(k[127:64], aa, alg == AUTH_HBMPP);
        check(cycles == 5, "HB-MP latency");
        if (xi == '0) begin
          check(dout == b && afail == z, "x_i = 0 case");
          if (afail) n_fail++;
        end else begin
          check(ref_dot(dout, xi) == z, "b.x_i = z_i");
          check(($countones(dout ^ b) == (b_adj ? 1 : 0)) && !afail, "adjust in one bit");
          if (b_adj) n_adj++; else n_keep++;
        end
      end
    endcase
    if (v) n_noise++;
    n_alg[2 + int'(alg)]++;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k;
    rst_n = 1'b0; start = 1'b0; sel_auth = 1'b0; enc_p = ENC_PRESENT; auth_p = AUTH_HB;
    key = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    bit_model = dut.BIT_SEED;
    num_model = dut.NUM_SEED;
    for (int t = 0; t < 300; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      if ($urandom % 3 == 0) encrypt(enc_alg_e'($urandom % 2), t % 17 == 0);
      else authenticate(auth_alg_e'($urandom % 4), k, {$urandom, $urandom}, t % 13 == 0);
    end
    // HB-MP+ with a = x gives x_i = 0: unsatisfiable whenever z = 1
    for (int t = 0; t < 16 && n_fail == 0; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      authenticate(AUTH_HBMPP, k, k[127:64], 1'b0);
    end
    $display("PRESENT %0d New %0d HB %0d HB+ %0d HB-MP %0d HB-MP+ %0d", n_alg[0], n_alg[1],
             n_alg[2], n_alg[3], n_alg[4], n_alg[5]);
    $display("ignored starts %0d noise %0d kept %0d adjusted %0d unsatisfiable %0d",
             n_ignored, n_noise, n_keep, n_adj, n_fail);
    for (int i = 0; i < 6; i++) check(n_alg[i] > 0, $sformatf("algorithm %0d exercised", i));
    check(n_ignored > 0, "start while busy exercised");
    check(n_noise > 0, "noise bit exercised");
    check(n_keep > 0 && n_adj > 0, "comparator keep and adjust exercised");
    check(n_fail > 0, "unsatisfiable round exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
