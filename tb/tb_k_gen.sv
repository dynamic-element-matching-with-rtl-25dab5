// tb_k_gen: drives random code pairs, dither and hold into a first-order
// and a second-order K[n] generator (M = 32, L = 4) and compares y[n] and
// K[n] every cycle with a reference loop written out here. Also checks the
// rules directly: K = L for even L + d - d', K = L +/- 1 for odd; for the
// first-order loop the running sum of K - L stays within -1..1, which is
// what first-order high-pass shaping of K means for a ternary sequence.
module tb_k_gen;
  import dem_pkg::*;
  localparam int M = 32, L = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, hold = 1'b0, dith = 1'b0;
  logic [5:0] d = '0, dp = '0;
  logic odd1, odd2;
  logic signed [1:0] y1, y2;
  logic [3:0] k1, k2;
  int checks = 0, failures = 0;

  k_gen #(.M(M), .L(L), .ORDER(SHAPE_ORDER1)) dut1 (
    .clk, .rst_n, .en_i(en), .hold_i(hold), .d_i(d), .d_prev_i(dp), .dither_i(dith),
    .odd_o(odd1), .y_o(y1), .k_o(k1));
  k_gen #(.M(M), .L(L), .ORDER(SHAPE_ORDER2)) dut2 (
    .clk, .rst_n, .en_i(en), .hold_i(hold), .d_i(d), .d_prev_i(dp), .dither_i(dith),
    .odd_o(odd2), .y_o(y2), .k_o(k2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int sat8(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a1 = 0, a2 = 0, b2 = 0;   // reference states
    int r1, r2, q, sum1 = 0, maxabs = 0, nplus = 0, nminus = 0, nzero = 0;
    bit par;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      d    = 6'($urandom_range(M));
      dp   = 6'($urandom_range(M));
      dith = 1'($urandom());
      hold = ($urandom_range(9) == 0);
      #1;
      par = ((L + int'(d) - int'(dp)) % 2) != 0;
      // first order
      q  = 2 * a1 + (dith ? 1 : -1);
      r1 = !par ? 0 : (q >= 0 ? 1 : -1);
      // second order
      q  = 8 * a2 + 2 * b2 + (dith ? 1 : -1);
      r2 = !par ? 0 : (q >= 0 ? 1 : -1);
      check(odd1 == par && odd2 == par, "parity");
      check(int'(y1) == r1, $sformatf("order1 y t=%0d got %0d exp %0d", t, y1, r1));
      check(int'(y2) == r2, $sformatf("order2 y t=%0d got %0d exp %0d", t, y2, r2));
      check(int'(k1) == L + r1, "order1 K = L + y");
      check(int'(k2) == L + r2, "order2 K = L + y");
      check(par ? (k1 == 4'(L - 1) || k1 == 4'(L + 1)) : (k1 == 4'(L)), "K rule");
      @(posedge clk);
      if (!hold) begin
        b2 = sat8(b2 + a2);
        a2 = sat8(a2 - r2);
        a1 = sat8(a1 - r1);
        sum1 += r1;
        if (r1 > 0) nplus++; else if (r1 < 0) nminus++; else nzero++;
      end
      if (sum1 > maxabs) maxabs = sum1;
      if (-sum1 > maxabs) maxabs = -sum1;
    end
    check(maxabs <= 1, $sformatf("order1 running sum of K-L bounded, max %0d", maxabs));
    check(nplus > 1000 && nminus > 1000 && nzero > 1000, "all three K values occur");
    $display("K=L+1: %0d  K=L: %0d  K=L-1: %0d", nplus, nzero, nminus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
