// dem_core: dynamic element matching encoder with a signal-independent
// number of element transitions.
//
// Each enabled clock takes the code d[n] (0..M) and selects d[n] of the M
// unit elements so that
//   * the total number of transitions (up plus down) is K[n], a value in
//     {L-1, L, L+1} chosen by a first- or second-order delta-sigma loop
//     (k_gen) and uncorrelated with d[n];
//   * exactly Gamma[n] = (K[n] + d[n] - d[n-1]) / 2 elements switch on, so
//     the total up-transition count is a linear function of d[n] plus a
//     high-pass shaped term, and the ISI error it causes is not distorted;
//   * the elements switched on are the least used of those that were off
//     (vector quantizer Vq1) and the elements kept on are the least used of
//     those that were on (Vq2); an OR of both gives d_i[n]. Usage is
//     tracked by usage_filter, which makes the element mismatch error
//     first- (or second-) order high-pass.
// When d[n] is too close to 0 or M, or the step d[n] - d[n-1] too large,
// for K[n] to be realised (transition_planner), the sample falls back to
// plain mismatch shaping: Vq1 selects the d[n] least used elements with no
// indicator bits, Vq2 selects none, and k_gen holds its state.
//
// Interface and timing: d_i is sampled on a rising clk edge with en_i high.
// The selection is formed combinationally from d_i and the registered state
// and appears on elem_o after that edge (one cycle latency), together with
// k_o and gamma_o (the planned K[n] and Gamma[n]) and fallback_o. Active-low
// synchronous reset clears the elements (d[-1] = 0) and all loop states.
// Codes above M are a usage error (asserted, not clamped).
module dem_core
  import dem_pkg::*;
#(
  parameter int unsigned  M     = M_DEFAULT,
  parameter int unsigned  L     = L_DEFAULT,
  parameter shape_order_e ORDER = SHAPE_ORDER1,
  parameter int unsigned  UW    = 16,
  parameter logic [15:0]  SEED  = 16'hACE1,
  localparam int unsigned DW    = $clog2(M + 1),
  localparam int unsigned KW    = $clog2(L + 2) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en_i,
  input  logic [DW-1:0] d_i,
  output logic [M-1:0]  elem_o,
  output logic [KW-1:0] k_o,
  output logic [DW-1:0] gamma_o,
  output logic          fallback_o
);

  logic [M-1:0]         prev;       // d_i[n-1] for every element
  logic [DW-1:0]        d_prev;     // d[n-1]
  logic                 dither;
  logic [KW-1:0]        k;
  logic [DW-1:0]        gamma, keep;
  logic                 fallback;
  logic signed [UW-1:0] key [M];
  logic [M-1:0]         ind1, ind2, sel1, sel2, sel;
  logic [DW-1:0]        n1, n2;

  dither_lfsr #(.SEED(SEED)) u_dither (
    .clk, .rst_n, .en(en_i), .bit_o(dither)
  );

  k_gen #(.M(M), .L(L), .ORDER(ORDER)) u_kgen (
    .clk, .rst_n, .en_i, .hold_i(fallback),
    .d_i, .d_prev_i(d_prev), .dither_i(dither),
    .odd_o(), .y_o(), .k_o(k)
  );

  transition_planner #(.M(M), .KW(KW)) u_plan (
    .d_i, .d_prev_i(d_prev), .k_i(k),
    .gamma_o(gamma), .keep_o(keep), .fallback_o(fallback)
  );

  usage_filter #(.M(M), .ORDER(ORDER), .UW(UW)) u_usage (
    .clk, .rst_n, .en_i, .sel_i(sel), .d_i, .key_o(key)
  );

  // Indicator bits: Vq1 prefers elements that were off, Vq2 those that
  // were on. In fallback Vq1 alone selects by usage.
  always_comb begin
    if (fallback) begin
      ind1 = '0;
      ind2 = '0;
      n1   = d_i;
      n2   = '0;
    end else begin
      ind1 = ~prev;
      ind2 = prev;
      n1   = gamma;
      n2   = keep;
    end
  end

  vq_select #(.M(M), .VW(UW)) u_vq1 (
    .key_i(key), .ind_i(ind1), .n_i(n1), .sel_o(sel1)
  );

  vq_select #(.M(M), .VW(UW)) u_vq2 (
    .key_i(key), .ind_i(ind2), .n_i(n2), .sel_o(sel2)
  );

  assign sel = sel1 | sel2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev       <= '0;
      d_prev     <= '0;
      k_o        <= '0;
      gamma_o    <= '0;
      fallback_o <= 1'b0;
    end else if (en_i) begin
      prev       <= sel;
      d_prev     <= d_i;
      k_o        <= k;
      gamma_o    <= gamma;
      fallback_o <= fallback;
    end
  end

  assign elem_o = prev;

  a_code_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                    en_i |-> (d_i <= DW'(M)));

endmodule
