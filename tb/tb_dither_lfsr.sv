// tb_dither_lfsr: checks the dither LFSR against a bit-serial reference of
// the polynomial x^16 + x^15 + x^13 + x^4 + 1, its full period of 65535
// steps with 32768 ones per period, that it holds when not enabled and
// that reset reloads the seed.
module tb_dither_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bit_o;
  int   checks = 0, failures = 0;
  logic [15:0] ref_s;
  int   ones;
  bit   first [65535];

  dither_lfsr #(.SEED(16'hACE1)) dut (.clk, .rst_n, .en, .bit_o);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_s = 16'hACE1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(bit_o == ref_s[15], "seed after reset");
    // hold when disabled
    repeat (3) @(negedge clk);
    check(bit_o == ref_s[15], "hold while en low");
    en = 1'b1;
    ones = 0;
    for (int n = 0; n < 65535; n++) begin
      @(negedge clk);
      ref_s = {ref_s[14:0], ref_s[15] ^ ref_s[14] ^ ref_s[12] ^ ref_s[3]};
      check(bit_o == ref_s[15], $sformatf("sequence step %0d", n));
      first[n] = bit_o;
      ones += int'(bit_o);
    end
    check(ref_s == 16'hACE1, "reference returns to seed after 65535 steps");
    check(ones == 32768, $sformatf("ones per period %0d", ones));
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      check(bit_o == first[n], "second period repeats the first");
    end
    rst_n = 1'b0;
    @(negedge clk);
    check(bit_o == 1'b1, "reset reloads seed (msb of 0xACE1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
