// tb_isi_distortion: checks that the encoder leaves no ISI-induced or
// mismatch-induced harmonics, against thermometer coding of the same codes.
// A first-order delta-sigma modulator turns a -1.5 dBFS sine with exactly
// 48 periods of 1332 samples into codes for M = 32; the direct-form encoder
// (L = 4) drives one unit_dac_model and a thermometer coder written here
// drives an identical one (same element errors: 1% mismatch, 2% ISI error,
// 1% ISI mismatch). Single-bin DFTs at the sine frequency and at harmonics
// 2..5 of the ISI error and of the mismatch error are compared with the
// fundamental of the code. Required: every harmonic of the encoder's ISI
// and mismatch errors is below -100 dBc, and at least 20 dB below the
// larger of the thermometer coder's 2nd and 3rd harmonics of the same error.
module tb_isi_distortion;
  localparam int    M = 32, L = 4;
  localparam int    PER = 1332, NPER = 48, N = PER * NPER;
  localparam real   PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, en_d = 1'b0;
  logic [7:0]  d8;
  logic [31:0] elem, therm;
  logic [3:0]  k;
  logic [5:0]  gamma;
  logic        fallback;
  real v_a, mm_a, isi_a, v_b, mm_b, isi_b;
  int  ups_a, ups_b;
  int  checks = 0, failures = 0;
  // DFT accumulators: [0] code, [1] ISI error, [2] mismatch error; a/b forms
  real re_a [3][6], im_a [3][6], re_b [3][6], im_b [3][6];
  int  nacc = 0;

  code_source #(.M(M), .AMP_DB(-1.5), .PERIOD(real'(PER)), .BURST(1'b0)) u_src (
    .clk, .rst_n, .en, .d(d8));

  dem_core #(.M(M), .L(L)) dut (
    .clk, .rst_n, .en_i(en), .d_i(6'(d8)), .elem_o(elem), .k_o(k), .gamma_o(gamma),
    .fallback_o(fallback));

  // reference thermometer coder: elements 0..d-1 on, registered like the DUT
  always @(posedge clk) if (en) therm <= (d8 >= 8'(M)) ? '1 : (32'(1) << d8) - 32'(1);
  initial therm = '0;

  unit_dac_model #(.M(M)) u_dac_a (.clk, .en(en_d), .elem(elem), .v(v_a), .mm_err(mm_a),
                                   .isi_err(isi_a), .ups(ups_a));
  unit_dac_model #(.M(M)) u_dac_b (.clk, .en(en_d), .elem(therm), .v(v_b), .mm_err(mm_b),
                                   .isi_err(isi_b), .ups(ups_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the DAC models see each encoder output one clock after its code
  always @(posedge clk) en_d <= en;

  function automatic real db(input real re, input real im, input real ref_re, input real ref_im);
    real a, r;
    a = $sqrt(re * re + im * im);
    r = $sqrt(ref_re * ref_re + ref_im * ref_im);
    if (a < 1e-30) return -400.0;
    return 20.0 * $log10(a / r);
  endfunction

  int warm = 0;
  always @(posedge clk) begin
    real xa [3], xb [3], ph;
    #5;
    if (en_d && rst_n) begin
      warm++;
      // code applied to the elements now: popcount of the thermometer form
      if (warm > 2 * PER && nacc < N) begin
        xa[0] = real'($countones(elem)); xb[0] = xa[0];
        xa[1] = isi_a; xb[1] = isi_b;
        xa[2] = mm_a;  xb[2] = mm_b;
        for (int h = 1; h <= 5; h++) begin
          ph = 2.0 * PI * h * nacc / PER;
          for (int s = 0; s < 3; s++) begin
            re_a[s][h] += xa[s] * $cos(ph); im_a[s][h] -= xa[s] * $sin(ph);
            re_b[s][h] += xb[s] * $cos(ph); im_b[s][h] -= xb[s] * $sin(ph);
          end
        end
        nacc++;
      end
    end
  end

  initial begin
    real wa, wb;
    foreach (re_a[s, h]) begin re_a[s][h] = 0; im_a[s][h] = 0; re_b[s][h] = 0; im_b[s][h] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    wait (nacc == N);
    @(negedge clk);
    for (int s = 1; s < 3; s++) begin
      wb = db(re_b[s][2], im_b[s][2], re_b[0][1], im_b[0][1]);
      if (db(re_b[s][3], im_b[s][3], re_b[0][1], im_b[0][1]) > wb)
        wb = db(re_b[s][3], im_b[s][3], re_b[0][1], im_b[0][1]);
      for (int h = 2; h <= 5; h++) begin
        wa = db(re_a[s][h], im_a[s][h], re_a[0][1], im_a[0][1]);
        $display("%s error, harmonic %0d: encoder %7.1f dBc  thermometer %7.1f dBc",
                 s == 1 ? "ISI     " : "mismatch", h, wa,
                 db(re_b[s][h], im_b[s][h], re_b[0][1], im_b[0][1]));
        check(wa < -100.0, $sformatf("%0d: harmonic %0d below -100 dBc", s, h));
        check(wa < wb - 20.0, $sformatf("%0d: harmonic %0d 20 dB below thermometer", s, h));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
