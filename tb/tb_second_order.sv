// tb_second_order: the top with ORDER = 2 (second-order shaping of both
// K[n] and the element mismatch), M = 32, L = 4, driven by a first-order
// delta-sigma modulator with a -3 dBFS sine of period 257. dem_checker
// verifies every sample of both forms. Second-order shaping is checked
// through its time-domain meaning: the double running sum of K - L and,
// for every element, the double running sum of its usage error
// M * d_i - d stay bounded (they would grow without bound for a sequence
// that is only first-order shaped or white).
module tb_second_order;
  import dem_pkg::*;
  localparam int M = 32, L = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0]  d8;
  logic [31:0] elem, t_elem;
  logic [3:0]  k, t_k;
  logic [5:0]  gamma, t_gamma;
  logic        fallback, t_fallback;
  int a_checks, a_fail, a_fb, a_km, a_k0, a_kp, a_ksum, a_ctrl, a_spread;
  int b_checks, b_fail, b_fb, b_km, b_k0, b_kp, b_ksum, b_ctrl, b_spread;
  int checks = 0, failures = 0;
  longint s1 = 0, s2 = 0, s2max = 0;
  longint u1 [M], u2 [M];
  longint u2max = 0;

  code_source #(.M(M), .AMP_DB(-3.0), .PERIOD(257.0), .BURST(1'b0)) u_src (
    .clk, .rst_n, .en, .d(d8));

  sit_dem_top #(.ORDER(SHAPE_ORDER2)) dut (
    .clk, .rst_n,
    .en_i(en), .d_i(6'(d8)), .elem_o(elem), .k_o(k), .gamma_o(gamma), .fallback_o(fallback),
    .t_en_i(en), .t_d_i(6'(d8)), .t_elem_o(t_elem), .t_k_o(t_k), .t_gamma_o(t_gamma),
    .t_fallback_o(t_fallback));

  dem_checker #(.M(M), .L(L), .POLICY(1'b0)) u_chk_a (
    .clk, .rst_n, .en, .d(d8), .elem, .k(8'(k)), .gamma(8'(gamma)), .fallback,
    .checks(a_checks), .failures(a_fail), .n_fallback(a_fb), .n_kminus(a_km),
    .n_kzero(a_k0), .n_kplus(a_kp), .k_sum(a_ksum), .n_ctrl(a_ctrl), .max_spread(a_spread));

  dem_checker #(.M(M), .L(L), .POLICY(1'b0), .HALF(M / 2)) u_chk_b (
    .clk, .rst_n, .en, .d(d8), .elem(t_elem), .k(8'(t_k)), .gamma(8'(t_gamma)),
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

  task automatic finish_tb();
    checks += a_checks + b_checks;
    failures += a_fail + b_fail;
    $display("direct: controlled %0d fallback %0d  K=L-1 %0d K=L %0d K=L+1 %0d",
             a_ctrl, a_fb, a_km, a_k0, a_kp);
    $display("max |double sum K-L| %0d  max |double sum usage error| %0d", s2max, u2max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  initial foreach (u1[i]) begin u1[i] = 0; u2[i] = 0; end

  always @(posedge clk) begin
    bit s;
    int dn;
    s  = en && rst_n;
    dn = int'(d8);
    #2;
    if (s) begin
      if (!fallback) begin
        s1 += longint'(int'(k) - L);
        s2 += s1;
        if (s2 > s2max) s2max = s2;
        if (-s2 > s2max) s2max = -s2;
      end
      for (int i = 0; i < M; i++) begin
        u1[i] += longint'((elem[i] ? M : 0) - dn);
        u2[i] += u1[i];
        if (u2[i] > u2max) u2max = u2[i];
        if (-u2[i] > u2max) u2max = -u2[i];
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int t = 0; t < 30000; t++) @(negedge clk);
    @(negedge clk);
    en = 1'b0;
    @(negedge clk);
    check(a_km > 100 && a_k0 > 100 && a_kp > 100, "K took L-1, L and L+1");
    check(s2max <= 40, "double running sum of K - L bounded");
    check(u2max <= 4000, "double running sum of each element's usage error bounded");
    finish_tb();
  end
endmodule
