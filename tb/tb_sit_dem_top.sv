// tb_sit_dem_top: end-to-end run of the top at its default parameters
// (M = 32, L = 4, first-order shaping). Both forms are driven by a
// first-order delta-sigma modulator, the direct form with a -1.5 dBFS sine
// of period 1332 samples and the tree form with a -3 dBFS sine of period
// 257, for 2^16 samples each, with full-scale bursts and idle cycles.
// dem_checker verifies every sample of both. The run also requires that
//   * K[n] is uncorrelated with the code d[n] and with its step
//     d[n] - d[n-1] (|correlation| < 0.05), the property the encoder exists
//     for, while Gamma[n] does follow the step;
//   * the running sum of K - L stays bounded (first-order shaped K);
//   * every mechanism happens: K = L-1, L, L+1, fallback, idle cycles in
//     the direct form; K below, at and above L and fallback in the tree.
module tb_sit_dem_top;
  localparam int M = 32, L = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, t_en = 1'b0;
  logic [7:0]  d8, t_d8;
  logic [31:0] elem, t_elem;
  logic [3:0]  k, t_k;
  logic [5:0]  gamma, t_gamma;
  logic        fallback, t_fallback;
  int a_checks, a_fail, a_fb, a_km, a_k0, a_kp, a_ksum, a_ctrl, a_spread;
  int b_checks, b_fail, b_fb, b_km, b_k0, b_kp, b_ksum, b_ctrl, b_spread;
  int checks = 0, failures = 0, n_idle = 0, ksum_max = 0;
  real sk = 0, sd = 0, skk = 0, sdd = 0, skd = 0, ss = 0, sss = 0, sks = 0, sg = 0, sgg = 0, sgs = 0;
  int  ns = 0;

  code_source #(.M(M), .AMP_DB(-1.5), .PERIOD(1332.0), .BURST(1'b1)) u_src_a (
    .clk, .rst_n, .en, .d(d8));
  code_source #(.M(M), .AMP_DB(-3.0), .PERIOD(257.0), .BURST(1'b1)) u_src_b (
    .clk, .rst_n, .en(t_en), .d(t_d8));

  sit_dem_top dut (
    .clk, .rst_n,
    .en_i(en), .d_i(6'(d8)), .elem_o(elem), .k_o(k), .gamma_o(gamma), .fallback_o(fallback),
    .t_en_i(t_en), .t_d_i(6'(t_d8)), .t_elem_o(t_elem), .t_k_o(t_k), .t_gamma_o(t_gamma),
    .t_fallback_o(t_fallback));

  dem_checker #(.M(M), .L(L), .POLICY(1'b1)) u_chk_a (
    .clk, .rst_n, .en, .d(d8), .elem, .k(8'(k)), .gamma(8'(gamma)), .fallback,
    .checks(a_checks), .failures(a_fail), .n_fallback(a_fb), .n_kminus(a_km),
    .n_kzero(a_k0), .n_kplus(a_kp), .k_sum(a_ksum), .n_ctrl(a_ctrl), .max_spread(a_spread));

  dem_checker #(.M(M), .L(L), .POLICY(1'b0), .HALF(M / 2)) u_chk_b (
    .clk, .rst_n, .en(t_en), .d(t_d8), .elem(t_elem), .k(8'(t_k)), .gamma(8'(t_gamma)),
    .fallback(t_fallback),
    .checks(b_checks), .failures(b_fail), .n_fallback(b_fb), .n_kminus(b_km),
    .n_kzero(b_k0), .n_kplus(b_kp), .k_sum(b_ksum), .n_ctrl(b_ctrl), .max_spread(b_spread));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real corr(input real sx, input real sy, input real sxx,
                               input real syy, input real sxy, input int n);
    real vx, vy;
    vx = sxx / n - (sx / n) * (sx / n);
    vy = syy / n - (sy / n) * (sy / n);
    if (vx <= 0.0 || vy <= 0.0) return 0.0;
    return (sxy / n - (sx / n) * (sy / n)) / $sqrt(vx * vy);
  endfunction

  task automatic finish_tb();
    checks += a_checks + b_checks;
    failures += a_fail + b_fail;
    $display("direct: controlled %0d fallback %0d K=L-1 %0d K=L %0d K=L+1 %0d spread %0d idle %0d",
             a_ctrl, a_fb, a_km, a_k0, a_kp, a_spread, n_idle);
    $display("tree  : controlled %0d fallback %0d K<L %0d K=L %0d K>L %0d spread %0d",
             b_ctrl, b_fb, b_km, b_k0, b_kp, b_spread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  // statistics of the direct form over controlled samples
  logic [7:0] d_prev_s = '0;
  always @(posedge clk) begin
    logic [7:0] dn;
    bit s;
    s  = en && rst_n;
    dn = d8;
    #2;
    if (s) begin
      if (!fallback) begin
        real kv, dv, sv, gv;
        kv = real'(int'(k));
        dv = real'(int'(dn));
        sv = real'(int'(dn) - int'(d_prev_s));
        gv = real'(int'(gamma));
        ns++;
        sk += kv; skk += kv * kv; sd += dv; sdd += dv * dv; skd += kv * dv;
        ss += sv; sss += sv * sv; sks += kv * sv;
        sg += gv; sgg += gv * gv; sgs += gv * sv;
      end
      d_prev_s = dn;
    end
    if (a_ksum > ksum_max) ksum_max = a_ksum;
    if (-a_ksum > ksum_max) ksum_max = -a_ksum;
  end

  initial begin
    real r_kd, r_ks, r_gs;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 70000; t++) begin
      @(negedge clk);
      en   = ($urandom_range(15) != 0);
      t_en = ($urandom_range(15) != 0);
      if (!en) n_idle++;
    end
    @(negedge clk);
    en = 1'b0; t_en = 1'b0;
    @(negedge clk);
    r_kd = corr(sk, sd, skk, sdd, skd, ns);
    r_ks = corr(sk, ss, skk, sss, sks, ns);
    r_gs = corr(sg, ss, sgg, sss, sgs, ns);
    $display("corr(K,d) %f  corr(K,step) %f  corr(Gamma,step) %f  max |sum(K-L)| %0d",
             r_kd, r_ks, r_gs, ksum_max);
    check(r_kd < 0.05 && r_kd > -0.05, "K uncorrelated with d");
    check(r_ks < 0.05 && r_ks > -0.05, "K uncorrelated with the code step");
    check(r_gs > 0.5, "Gamma follows the code step");
    check(ksum_max <= 2, "running sum of K - L bounded");
    check(a_km > 100 && a_k0 > 100 && a_kp > 100, "direct: K took L-1, L and L+1");
    check(a_fb > 0, "direct: fallback happened");
    check(n_idle > 0, "direct: idle cycles happened");
    check(b_km > 100 && b_k0 > 100 && b_kp > 100, "tree: K below, at and above L");
    check(b_fb > 0, "tree: fallback happened");
    check(a_spread <= 12 && b_spread <= 16, "usage spread bounded");
    finish_tb();
  end
endmodule
