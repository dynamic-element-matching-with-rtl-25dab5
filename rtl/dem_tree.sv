// dem_tree: reduced-complexity form of the encoder, built as a tree.
//
// Instead of two M-input vector quantizers, the code d[n] is first split
// into two codes of half the range (splitter), and each drives its own
// encoder (dem_core) of M/2 elements whose average transition count is
// L/2, so the whole DAC still averages L transitions per sample. The
// vector quantizers then rank M/2 rather than M elements, which roughly
// quarters their comparator count, at the cost of a somewhat higher
// mismatch noise floor. Elements 0..M/2-1 belong to half a and M/2..M-1 to
// half b.
//
// Interface and timing as dem_core: d_i sampled on a clock with en_i high,
// elem_o and the status outputs follow one cycle later. k_o and gamma_o are
// the sums of the two halves' planned values; fallback_o is raised when
// either half fell back to plain mismatch shaping.
module dem_tree
  import dem_pkg::*;
#(
  parameter int unsigned  M     = M_DEFAULT,
  parameter int unsigned  L     = L_DEFAULT,
  parameter shape_order_e ORDER = SHAPE_ORDER1,
  parameter int unsigned  UW    = 16,
  localparam int unsigned DW    = $clog2(M + 1),
  localparam int unsigned HW    = $clog2(M / 2 + 1),
  localparam int unsigned KW    = $clog2(L + 2) + 1,
  localparam int unsigned HKW   = $clog2(L / 2 + 2) + 1
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

  logic            dither;
  logic [HW-1:0]   d_a, d_b;
  logic [HKW-1:0]  k_a, k_b;
  logic [HW-1:0]   g_a, g_b;
  logic            fb_a, fb_b;

  dither_lfsr #(.SEED(16'h1D0F)) u_dither (
    .clk, .rst_n, .en(en_i), .bit_o(dither)
  );

  splitter #(.M(M)) u_split (
    .clk, .rst_n, .en_i, .d_i, .dither_i(dither), .d_a_o(d_a), .d_b_o(d_b)
  );

  dem_core #(.M(M / 2), .L(L / 2), .ORDER(ORDER), .UW(UW), .SEED(16'h5A5A)) u_half_a (
    .clk, .rst_n, .en_i, .d_i(d_a),
    .elem_o(elem_o[M/2-1:0]), .k_o(k_a), .gamma_o(g_a), .fallback_o(fb_a)
  );

  dem_core #(.M(M / 2), .L(L / 2), .ORDER(ORDER), .UW(UW), .SEED(16'hB7E3)) u_half_b (
    .clk, .rst_n, .en_i, .d_i(d_b),
    .elem_o(elem_o[M-1:M/2]), .k_o(k_b), .gamma_o(g_b), .fallback_o(fb_b)
  );

  assign k_o        = KW'(k_a) + KW'(k_b);
  assign gamma_o    = DW'(g_a) + DW'(g_b);
  assign fallback_o = fb_a | fb_b;

endmodule
