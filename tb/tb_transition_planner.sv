// tb_transition_planner: exhaustive check of Gamma[n] = (K + d - d')/2,
// keep = d - Gamma and of the feasibility conditions K <= 2M - d - d' and
// d - d' <= K <= d + d' (with even parity) for M = 32, every pair of codes
// and K from 0 to 7, against integer arithmetic written out here. Also
// checks the worked example: with M = 32 and K = L = 2 a steady code is
// feasible exactly for 1 <= d <= 31.
module tb_transition_planner;
  localparam int M  = 32;
  localparam int KW = 4;
  logic [5:0]    d, dp, gamma, keep;
  logic [KW-1:0] k;
  logic          fallback;
  int checks = 0, failures = 0;

  transition_planner #(.M(M), .KW(KW)) dut (
    .d_i(d), .d_prev_i(dp), .k_i(k), .gamma_o(gamma), .keep_o(keep), .fallback_o(fallback)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, ok_cnt;
    bit feas;
    for (int a = 0; a <= M; a++)
      for (int b = 0; b <= M; b++)
        for (int kk = 0; kk < 8; kk++) begin
          d = 6'(a); dp = 6'(b); k = KW'(kk);
          #1;
          // feasible when both steps of the selection can be carried out
          feas = ((kk + a - b) % 2 == 0);
          g = (kk + a - b) / 2;
          if (feas) feas = (g >= 0) && (b + g <= M) && (a - g >= 0) && (a - g <= b);
          check(fallback == !feas, $sformatf("fallback d=%0d dp=%0d k=%0d", a, b, kk));
          if (feas) begin
            check(int'(gamma) == g, $sformatf("gamma d=%0d dp=%0d k=%0d", a, b, kk));
            check(int'(keep) == a - g, $sformatf("keep d=%0d dp=%0d k=%0d", a, b, kk));
            check(int'(gamma) + int'(keep) == a, "gamma + keep = d");
          end
        end
    ok_cnt = 0;
    for (int a = 0; a <= M; a++) begin
      d = 6'(a); dp = 6'(a); k = KW'(2);
      #1;
      check(fallback == !(a >= 1 && a <= 31), $sformatf("steady code %0d with K=2", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
