// dem_checker: testbench monitor for one DEM encoder output.
//
// On every clock edge that samples a code it remembers the code and the
// element pattern before the edge, then one step after the edge checks
//   * exactly d[n] elements are on;
//   * when no fallback is flagged: the number of changed elements equals the
//     planned K[n], the number switched on equals the planned Gamma[n],
//     K[n] is L for an even L + d[n] - d[n-1] and L +/- 1 for an odd one;
//   * with POLICY = 1 (first-order usage filter, direct form only) the
//     elements switched on are the least used of those that were off, the
//     kept ones the least used of those that were on, and in fallback the
//     selected ones the least used overall, against a usage model kept here;
//   * with HALF > 0 (tree form): the total K within L +/- 2, each half's
//     transitions within L/2 +/- 1, the halves' element counts within one;
//   * on a clock edge without a sample, nothing changes.
// It also counts how often each mechanism happened, for the caller to
// require, and tracks the largest usage spread (in units of uses).
module dem_checker #(
  parameter int M      = 32,
  parameter int L      = 4,
  parameter bit POLICY = 1'b0,
  parameter int HALF   = 0     // >0: also check each half of a tree form
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [7:0]     d,
  input  logic [M-1:0]   elem,
  input  logic [7:0]     k,
  input  logic [7:0]     gamma,
  input  logic           fallback,
  output int             checks,
  output int             failures,
  output int             n_fallback,
  output int             n_kminus,
  output int             n_kzero,
  output int             n_kplus,
  output int             k_sum,
  output int             n_ctrl,
  output int             max_spread
);

  int x1 [M];
  int use_cnt [M];
  int t_total = 0;

  initial begin
    checks = 0; failures = 0; n_fallback = 0; n_kminus = 0; n_kzero = 0;
    n_kplus = 0; k_sum = 0; n_ctrl = 0; max_spread = 0;
    foreach (x1[i]) begin x1[i] = 0; use_cnt[i] = 0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%m] %s", what);
    end
  endtask

  always @(posedge clk) begin
    logic [M-1:0] prev_e, now_e;
    int dd, dprev, kk, ups, kr, mx, mn;
    bit samp;
    samp   = en && rst_n;
    prev_e = elem;
    dd     = int'(d);
    dprev  = $countones(elem);
    #1;
    now_e = elem;
    if (!samp) begin
      if (rst_n) check(now_e == prev_e, "elements hold without a sample");
    end else begin
      kk  = $countones(now_e ^ prev_e);
      ups = $countones(now_e & ~prev_e);
      check($countones(now_e) == dd, $sformatf("ones %0d for code %0d", $countones(now_e), dd));
      if (fallback) n_fallback++;
      else begin
        n_ctrl++;
        kr = int'(k);
        check(kk == kr, $sformatf("transitions %0d vs planned K %0d", kk, kr));
        check(ups == int'(gamma), $sformatf("ups %0d vs planned Gamma %0d", ups, gamma));
        check(2 * ups == kk + dd - dprev, "Gamma = (K + d - d')/2");
        if (HALF > 0) begin
          check(kr >= L - 2 && kr <= L + 2, "tree K within L +/- 2");
          if (kr == L) n_kzero++; else if (kr > L) n_kplus++; else n_kminus++;
        end else if (((L + dd - dprev) % 2) == 0) begin
          check(kr == L, "K = L for even parity");
          n_kzero++;
        end else begin
          check(kr == L - 1 || kr == L + 1, "K = L +/- 1 for odd parity");
          if (kr > L) n_kplus++; else n_kminus++;
        end
        k_sum += kr - L;
        if (HALF > 0) begin
          check($countones(now_e[HALF-1:0] ^ prev_e[HALF-1:0]) inside {[L/2-1:L/2+1]},
                "half a transitions within L/2 +/- 1");
          check($countones(now_e[M-1:HALF] ^ prev_e[M-1:HALF]) inside {[L/2-1:L/2+1]},
                "half b transitions within L/2 +/- 1");
        end
      end
      if (HALF > 0) begin
        check($countones(now_e[HALF-1:0]) - $countones(now_e[M-1:HALF]) inside {[-1:1]},
              "halves carry the code within one element");
      end
      if (POLICY) begin
        for (int i = 0; i < M; i++)
          for (int j = 0; j < M; j++) begin
            if (fallback) begin
              if (now_e[i] && !now_e[j])
                check(x1[i] >= x1[j], "fallback selects the least used");
            end else begin
              if (now_e[i] && !prev_e[i] && !now_e[j] && !prev_e[j])
                check(x1[i] >= x1[j], "switched on the least used of the off elements");
              if (now_e[i] && prev_e[i] && !now_e[j] && prev_e[j])
                check(x1[i] >= x1[j], "kept on the least used of the on elements");
            end
          end
      end
      t_total++;
      for (int i = 0; i < M; i++) begin
        x1[i] += dd - (now_e[i] ? M : 0);
        use_cnt[i] += int'(now_e[i]);
      end
      mx = x1[0]; mn = x1[0];
      for (int i = 1; i < M; i++) begin
        if (x1[i] > mx) mx = x1[i];
        if (x1[i] < mn) mn = x1[i];
      end
      if ((mx - mn) / M > max_spread) max_spread = (mx - mn) / M;
    end
  end

endmodule
