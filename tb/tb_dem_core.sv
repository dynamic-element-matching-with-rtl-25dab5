// tb_dem_core: the direct-form encoder at M = 32, L = 4, first order, fed
// by a first-order delta-sigma modulator with a -3 dBFS sine of period 257
// samples and occasional full-scale bursts. dem_checker verifies every
// sample (element count, realised K and Gamma against the plan, the
// parity rule, the least-used selection policy and holding while en is
// low). Also checked: the elements appear one clock after the code is
// sampled, K averages L over controlled samples with its running sum of
// K - L bounded (first-order shaping), the usage spread stays bounded, and
// every mechanism (K = L-1, L, L+1, fallback, idle cycles) occurs.
module tb_dem_core;
  import dem_pkg::*;
  localparam int M = 32, L = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0]  d8;
  logic [5:0]  d;
  logic [31:0] elem;
  logic [3:0]  k;
  logic [5:0]  gamma;
  logic        fallback;
  int c_checks, c_fail, n_fb, n_km, n_k0, n_kp, k_sum, n_ctrl, spread;
  int checks = 0, failures = 0, n_idle = 0;

  code_source #(.M(M), .AMP_DB(-3.0), .PERIOD(257.0), .BURST(1'b1)) u_src (
    .clk, .rst_n, .en, .d(d8));
  assign d = 6'(d8);

  dem_core #(.M(M), .L(L)) dut (
    .clk, .rst_n, .en_i(en), .d_i(d), .elem_o(elem), .k_o(k), .gamma_o(gamma),
    .fallback_o(fallback));

  dem_checker #(.M(M), .L(L), .POLICY(1'b1)) u_chk (
    .clk, .rst_n, .en, .d(d8), .elem, .k(8'(k)), .gamma(8'(gamma)), .fallback,
    .checks(c_checks), .failures(c_fail), .n_fallback(n_fb), .n_kminus(n_km),
    .n_kzero(n_k0), .n_kplus(n_kp), .k_sum, .n_ctrl, .max_spread(spread));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic finish_tb();
    checks += c_checks;
    failures += c_fail;
    $display("controlled %0d fallback %0d  K=L-1 %0d K=L %0d K=L+1 %0d  sum(K-L) %0d  spread %0d idle %0d",
             n_ctrl, n_fb, n_km, n_k0, n_kp, k_sum, spread, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  int ksum_max = 0;
  always @(posedge clk) begin
    #2;
    if (k_sum > ksum_max) ksum_max = k_sum;
    if (-k_sum > ksum_max) ksum_max = -k_sum;
  end

  initial begin
    logic [31:0] prev_e;
    int code;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(elem == '0 && fallback == 1'b0, "reset state");
    for (int t = 0; t < 12000; t++) begin
      @(negedge clk);
      en = ($urandom_range(15) != 0);
      if (!en) n_idle++;
      if (t == 100) begin
        // latency: a code sampled on an edge shows on the elements right
        // after that edge, and not before it
        en = 1'b1;
        @(posedge clk);
        prev_e = elem;
        code   = int'(d8);
        #1;
        check($countones(elem) == code, "elements follow the code one clock later");
        check(elem != prev_e || $countones(prev_e) == code, "update happens at the edge");
      end
    end
    @(negedge clk);
    en = 1'b0;
    @(negedge clk);
    check(n_km > 100 && n_kp > 100 && n_k0 > 100, "K took all three values");
    check(n_fb > 0, "fallback happened");
    check(n_idle > 0, "idle cycles happened");
    check(ksum_max <= 2, $sformatf("running sum of K-L bounded, max %0d", ksum_max));
    check(n_ctrl > 9 * n_fb, "controlled samples dominate");
    check(spread <= 12, $sformatf("usage spread bounded: %0d", spread));
    finish_tb();
  end
endmodule
