// tb_vq_select: random keys, indicator bits and counts for a 32-element
// quantizer. The reference picks the N best elements one at a time (highest
// indicator first, then highest key, lowest index on ties) and the result
// must equal the block's selection bit for bit. Repeated keys are forced
// often so the tie rule is exercised.
module tb_vq_select;
  localparam int M  = 32;
  localparam int VW = 16;
  logic signed [VW-1:0] key [M];
  logic [M-1:0]         ind, sel;
  logic [5:0]           n;
  int checks = 0, failures = 0;

  vq_select #(.M(M), .VW(VW)) dut (.key_i(key), .ind_i(ind), .n_i(n), .sel_o(sel));

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
    logic [M-1:0] exp_sel;
    int best, cnt;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < M; i++)
        key[i] = (t % 3 == 0) ? VW'($signed($urandom_range(6)) - 3)
                              : VW'($signed($urandom()) >>> 16);
      ind = (t % 4 == 0) ? '0 : M'($urandom());
      n   = 6'($urandom_range(M));
      #1;
      exp_sel = '0;
      for (int c = 0; c < int'(n); c++) begin
        best = -1;
        for (int i = 0; i < M; i++) begin
          if (!exp_sel[i]) begin
            if (best < 0) best = i;
            else if ({ind[i], ~key[i][VW-1], key[i][VW-2:0]} >
                     {ind[best], ~key[best][VW-1], key[best][VW-2:0]}) best = i;
          end
        end
        exp_sel[best] = 1'b1;
      end
      cnt = $countones(sel);
      check(cnt == int'(n), $sformatf("count %0d for n=%0d", cnt, n));
      check(sel == exp_sel, $sformatf("selection t=%0d got %h exp %h", t, sel, exp_sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
