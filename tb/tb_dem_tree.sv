// tb_dem_tree: the tree form (splitter plus two 16-element encoders with
// L/2 = 2 each) at M = 32, L = 4, fed by a first-order delta-sigma
// modulator with a -3 dBFS sine and full-scale bursts. dem_checker verifies
// per sample: element count equals the code, the halves differ by at most
// one element, realised K and Gamma equal the plan, each half switches
// L/2 +/- 1 elements and the total K stays within L +/- 2. Also required:
// K averages L, and fallback and all K values occur.
module tb_dem_tree;
  localparam int M = 32, L = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0]  d8;
  logic [31:0] elem;
  logic [3:0]  k;
  logic [5:0]  gamma;
  logic        fallback;
  int c_checks, c_fail, n_fb, n_km, n_k0, n_kp, k_sum, n_ctrl, spread;
  int checks = 0, failures = 0;

  code_source #(.M(M), .AMP_DB(-3.0), .PERIOD(257.0), .BURST(1'b1)) u_src (
    .clk, .rst_n, .en, .d(d8));

  dem_tree #(.M(M), .L(L)) dut (
    .clk, .rst_n, .en_i(en), .d_i(6'(d8)), .elem_o(elem), .k_o(k), .gamma_o(gamma),
    .fallback_o(fallback));

  dem_checker #(.M(M), .L(L), .POLICY(1'b0), .HALF(M / 2)) u_chk (
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
    $display("controlled %0d fallback %0d  K<L %0d K=L %0d K>L %0d  sum(K-L) %0d  spread %0d",
             n_ctrl, n_fb, n_km, n_k0, n_kp, k_sum, spread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 12000; t++) begin
      @(negedge clk);
      en = ($urandom_range(15) != 0);
    end
    @(negedge clk);
    en = 1'b0;
    @(negedge clk);
    check(n_km > 100 && n_kp > 100 && n_k0 > 100, "K below, at and above L");
    check(n_fb > 0, "fallback happened");
    check(k_sum < n_ctrl / 50 && k_sum > -n_ctrl / 50, "K averages L");
    check(spread <= 16, $sformatf("usage spread bounded: %0d", spread));
    finish_tb();
  end
endmodule
