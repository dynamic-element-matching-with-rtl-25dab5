// unit_dac_model: behavioural model (not synthesizable) of the M analog
// unit elements of an NRZ DAC, for testbenches. For element i, sample n:
//   v_i = (1 + delta_i) d_i[n] + alpha_i + beta_i d_i[n] + gamma_i d_i[n-1]
//         + eps_i * up_i[n],     up_i[n] = (1 - d_i[n-1]) d_i[n]
// The static mismatch delta_i and the ISI coefficients are drawn at start-up
// from $urandom: delta_i with standard deviation SIGMA_MM (uniform
// distribution of that spread), eps_i = EPS (1 + r_i) with relative spread
// EPS_REL, from a generator seeded with SEED so that two instances with
// the same SEED model the same elements; alpha, beta and gamma are fixed
// small constants. Each enabled clock it updates, after the edge, v (the summed output), the mismatch
// part sum(delta_i d_i), the ISI part sum(eps_i up_i) and the up count.
module unit_dac_model #(
  parameter int  M        = 32,
  parameter real SIGMA_MM = 0.01,
  parameter real EPS      = 0.02,
  parameter real EPS_REL  = 0.01,
  parameter int  SEED     = 12345
) (
  input  logic         clk,
  input  logic         en,
  input  logic [M-1:0] elem,
  output real          v,
  output real          mm_err,
  output real          isi_err,
  output int           ups
);

  real delta [M];
  real eps   [M];
  logic [M-1:0] last = '0;
  localparam real ALPHA = 0.001, BETA = 0.002, GAMMA = 0.003;

  // uniform in [-1, 1) scaled to unit standard deviation
  function automatic real unit_rand();
    return (($urandom_range(1000000) / 500000.0) - 1.0) * 1.7320508;
  endfunction

  initial begin
    v = 0.0; mm_err = 0.0; isi_err = 0.0; ups = 0;
    void'($urandom(SEED));
    for (int i = 0; i < M; i++) begin
      delta[i] = SIGMA_MM * unit_rand();
      eps[i]   = EPS * (1.0 + EPS_REL * unit_rand());
    end
  end

  always @(posedge clk) begin
    logic [M-1:0] now_e;
    real sv, sm, si;
    int  nu;
    #3;
    if (en) begin
      now_e = elem;
      sv = 0.0; sm = 0.0; si = 0.0; nu = 0;
      for (int i = 0; i < M; i++) begin
        sm += delta[i] * real'(now_e[i]);
        if (now_e[i] && !last[i]) begin
          si += eps[i];
          nu++;
        end
        sv += (1.0 + delta[i] + BETA) * real'(now_e[i]) + ALPHA + GAMMA * real'(last[i]);
      end
      v = sv + si; mm_err = sm; isi_err = si; ups = nu;
      last = now_e;
    end
  end

endmodule
