// tb_usage_filter: applies random selections (d = number of ones) to a
// first- and a second-order usage filter with M = 16 and compares every key
// with a reference written out here: x1 += d - M*d_i, x2 += x1, key = x1 or
// 2*x1 + x2, all saturating at 16 bits. For the first-order filter it also
// checks that the keys sum to zero and that an element used more often
// than average ends with a lower key than one used less often.
module tb_usage_filter;
  import dem_pkg::*;
  localparam int M = 16, UW = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [M-1:0] sel = '0;
  logic [4:0]   d = '0;
  logic signed [UW-1:0] key1 [M];
  logic signed [UW-1:0] key2 [M];
  int checks = 0, failures = 0;

  usage_filter #(.M(M), .ORDER(SHAPE_ORDER1), .UW(UW)) dut1 (
    .clk, .rst_n, .en_i(en), .sel_i(sel), .d_i(d), .key_o(key1));
  usage_filter #(.M(M), .ORDER(SHAPE_ORDER2), .UW(UW)) dut2 (
    .clk, .rst_n, .en_i(en), .sel_i(sel), .d_i(d), .key_o(key2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x1 [M], x2 [M];
    int s;
    foreach (x1[i]) begin x1[i] = 0; x2[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      en = ($urandom_range(7) != 0);
      if (t < 3000) sel = M'($urandom());
      else          sel = {1'b1, 14'($urandom()), 1'b0};  // element 15 always on, 0 always off
      d = 5'($countones(sel));
      @(posedge clk);
      if (en)
        for (int i = 0; i < M; i++) begin
          x2[i] = sat(x2[i] + x1[i]);
          x1[i] = sat(x1[i] + int'(d) - (sel[i] ? M : 0));
        end
      #1;
      s = 0;
      for (int i = 0; i < M; i++) begin
        check(int'(key1[i]) == x1[i], $sformatf("order1 key %0d t=%0d", i, t));
        check(int'(key2[i]) == sat(2 * x1[i] + x2[i]), $sformatf("order2 key %0d t=%0d", i, t));
        s += int'(key1[i]);
      end
      check(s == 0, "order1 keys sum to zero");
    end
    check(key1[0] > key1[M-1], "less used element has the larger key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
