// tb_splitter: random codes 0..32 into the splitter. Checks that the two
// halves add up to the code, differ by at most one, differ only for odd
// codes, match a reference of the split loop, and that the running sum of
// (d_a - d_b) stays within -1..1 (first-order shaped split).
module tb_splitter;
  localparam int M = 32;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, dith = 1'b0;
  logic [5:0] d = '0;
  logic [4:0] da, db;
  int checks = 0, failures = 0;

  splitter #(.M(M)) dut (.clk, .rst_n, .en_i(en), .d_i(d), .dither_i(dith),
                         .d_a_o(da), .d_b_o(db));

  always #5 clk = ~clk;

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
    int x = 0, s, acc = 0, maxabs = 0, nodd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      en   = ($urandom_range(5) != 0);
      d    = 6'($urandom_range(M));
      dith = 1'($urandom());
      #1;
      s = (d[0] == 1'b0) ? 0 : ((2 * x + (dith ? 1 : -1)) >= 0 ? 1 : -1);
      check(int'(da) + int'(db) == int'(d), "halves add up");
      check(int'(da) - int'(db) == s, $sformatf("split t=%0d", t));
      @(posedge clk);
      if (en) begin
        x -= s;
        acc += s;
        if (s != 0) nodd++;
      end
      if (acc > maxabs) maxabs = acc;
      if (-acc > maxabs) maxabs = -acc;
    end
    check(maxabs <= 1, $sformatf("split running sum bounded, max %0d", maxabs));
    check(nodd > 1000, "odd codes were split");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
