// tb_hb_auth: runs 400 random authentication rounds across HB, HB+, HB-MP
// and HB-MP+ and compares z_out, auth_out, b_adjusted and the latency
// (3, 4, 5, 5 cycles) with a reference that tracks both LFSRs.  For HB-MP
// and HB-MP+ it also checks the protocol equation b.x_i = z_i directly.
module tb_hb_auth;
  import tb_ref_pkg::*;
  import crypto_pkg::*;

  localparam logic [31:0] BSEED = 32'h2468_ACE1;
  localparam logic [63:0] NSEED = 64'h0F1E_2D3C_4B5A_6978;

  logic        clk = 1'b0;
  logic        rst_n, start, z_out, b_adj, fail, busy, done;
  auth_alg_e   protocol;
  logic [63:0] key1, key2, a, auth_out;
  logic [31:0] bit_model;
  logic [63:0] num_model;
  int          checks = 0, failures = 0;
  int          seen [4];
  int          n_adj = 0, n_noise = 0;

  always #5 clk = ~clk;

  hb_auth #(.BIT_SEED(BSEED), .NUM_SEED(NSEED)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .protocol(protocol), .key1(key1), .key2(key2),
    .ran_num_in(a), .auth_out(auth_out), .z_out(z_out), .b_adjusted(b_adj), .fail(fail),
    .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input auth_alg_e alg, input logic [63:0] x, input logic [63:0] y,
                     input logic [63:0] aa);
    logic        v, z, adj;
    logic [63:0] b, xi, exp_out;
    int          cycles, exp_cycles;
    protocol = alg; key1 = x; key2 = y; a = aa; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    key1 = ~x; key2 = ~y; a = ~aa;     // inputs are sampled at start only
    cycles = 0;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
    bit_model = ref_lfsr32(bit_model);
    v = bit_model[0];
    if (alg != AUTH_HB) num_model = ref_lfsr64(num_model);
    b = num_model;
    adj = 1'b0;
    xi = '0;
    unique case (alg)
      AUTH_HB:  begin z = ref_dot(x, aa) ^ v; exp_out = {63'b0, z}; exp_cycles = 3; end
      AUTH_HBP: begin z = ref_dot(x, aa) ^ ref_dot(y, b) ^ v; exp_out = b; exp_cycles = 4; end
      default: begin
        z  = ref_dot(x, aa) ^ v;
        xi = ref_round_key(x, aa, alg == AUTH_HBMPP);
        exp_out = b;
        if (ref_dot(b, xi) != z) begin
          for (int i = 0; i < 64; i++)
            if (xi[i]) begin exp_out[i] = ~exp_out[i]; break; end
          adj = 1'b1;
        end
        exp_cycles = 5;
      end
    endcase
    check(z_out == z, $sformatf("%s z", alg.name()));
    check(auth_out == exp_out, $sformatf("%s out %h expected %h", alg.name(), auth_out, exp_out));
    check(cycles == exp_cycles, $sformatf("%s latency %0d", alg.name(), cycles));
    if (alg == AUTH_HBMP || alg == AUTH_HBMPP) begin
      check(ref_dot(auth_out, xi) == z_out, "b.x_i = z_i");
      check(b_adj == adj && !fail, "adjust flag");
      if (adj) n_adj++;
    end
    if (v) n_noise++;
    seen[alg]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; protocol = AUTH_HB; key1 = '0; key2 = '0; a = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    bit_model = BSEED;
    num_model = NSEED;
    for (int t = 0; t < 400; t++)
      run(auth_alg_e'($urandom % 4), {$urandom, $urandom}, {$urandom, $urandom},
          {$urandom, $urandom});
    for (int p = 0; p < 4; p++) check(seen[p] > 50, $sformatf("protocol %0d exercised", p));
    check(n_adj > 20 && n_noise > 50, "comparator adjustment and noise exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
