// tb_workloads: the operating points the encoder is evaluated at, run with
// a first-order delta-sigma modulator as the code source (largest NTF gain
// 2) and 2^15 samples each:
//   M = 32, L = 3, 4, 5 with a -3 dBFS sine of period 257 samples
//   M = 16, L = 2       with a -3 dBFS sine of period 257 samples
// dem_checker verifies every sample of each (element count, realised K and
// Gamma against the plan, parity rule, least-used selection). The run
// prints how often each encoder fell back and requires that K takes all of
// L-1, L and L+1 and that fewer than 1% of the samples fall back.
module tb_workloads;
  localparam int N = 32768;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one encoder with its own code source and monitor
  `define WL_POINT(NAME, MM, LL)                                                        \
    logic [7:0] NAME``_d;                                                               \
    logic [MM-1:0] NAME``_e;                                                            \
    logic [$clog2(LL+2):0] NAME``_k;                                                    \
    logic [$clog2(MM+1)-1:0] NAME``_g;                                                  \
    logic NAME``_fb;                                                                    \
    int NAME``_c, NAME``_f, NAME``_nfb, NAME``_km, NAME``_k0, NAME``_kp, NAME``_ks,     \
        NAME``_nc, NAME``_sp;                                                           \
    code_source #(.M(MM), .AMP_DB(-3.0), .PERIOD(257.0)) NAME``_src (                   \
      .clk, .rst_n, .en, .d(NAME``_d));                                                 \
    dem_core #(.M(MM), .L(LL)) NAME``_dut (                                             \
      .clk, .rst_n, .en_i(en), .d_i($clog2(MM+1)'(NAME``_d)), .elem_o(NAME``_e),        \
      .k_o(NAME``_k), .gamma_o(NAME``_g), .fallback_o(NAME``_fb));                      \
    dem_checker #(.M(MM), .L(LL), .POLICY(1'b1)) NAME``_chk (                           \
      .clk, .rst_n, .en, .d(NAME``_d), .elem(NAME``_e), .k(8'(NAME``_k)),               \
      .gamma(8'(NAME``_g)), .fallback(NAME``_fb), .checks(NAME``_c),                    \
      .failures(NAME``_f), .n_fallback(NAME``_nfb), .n_kminus(NAME``_km),               \
      .n_kzero(NAME``_k0), .n_kplus(NAME``_kp), .k_sum(NAME``_ks), .n_ctrl(NAME``_nc),  \
      .max_spread(NAME``_sp));

  `WL_POINT(m32l3, 32, 3)
  `WL_POINT(m32l4, 32, 4)
  `WL_POINT(m32l5, 32, 5)
  `WL_POINT(m16l2, 16, 2)

  task automatic report(input string name, input int c, input int f, input int nfb,
                        input int km, input int k0, input int kp, input int sp);
    checks += c;
    failures += f;
    $display("%s: fallback %0d of %0d  K=L-1 %0d K=L %0d K=L+1 %0d  usage spread %0d",
             name, nfb, N, km, k0, kp, sp);
    check(km > 100 && k0 > 100 && kp > 100, {name, ": K took L-1, L and L+1"});
    check(nfb < N / 100, {name, ": fallback below 1%"});
  endtask

  task automatic finish_tb();
    report("M=32 L=3", m32l3_c, m32l3_f, m32l3_nfb, m32l3_km, m32l3_k0, m32l3_kp, m32l3_sp);
    report("M=32 L=4", m32l4_c, m32l4_f, m32l4_nfb, m32l4_km, m32l4_k0, m32l4_kp, m32l4_sp);
    report("M=32 L=5", m32l5_c, m32l5_f, m32l5_nfb, m32l5_km, m32l5_k0, m32l5_kp, m32l5_sp);
    report("M=16 L=2", m16l2_c, m16l2_f, m16l2_nfb, m16l2_km, m16l2_k0, m16l2_kp, m16l2_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    repeat (N) @(negedge clk);
    en = 1'b0;
    @(negedge clk);
    finish_tb();
  end
endmodule
