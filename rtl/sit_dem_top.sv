// sit_dem_top: DEM encoders with signal-independent transition counts for
// an M-element unit-element delta-sigma DAC.
//
// Two forms of the same encoder stand side by side, each with its own
// ports and meant to drive its own DAC:
//   direct : dem_core, two M-input vector quantizers (the main form)
//   tree   : dem_tree, a splitter feeding two M/2-element encoders, each
//            averaging L/2 transitions (the reduced-complexity form)
// Both take a code 0..M per enabled clock and return the M element
// controls one clock later, with the planned transition count K[n], the
// planned up-transition count Gamma[n] and a fallback flag (the sample was
// too close to 0 or M for K[n] to be realised and was encoded by usage
// alone). ORDER selects first- or second-order shaping of both K[n] and the
// element mismatch.
//
// The digital delta-sigma modulator that produces the code and the analog
// unit elements lie outside: the code inputs and element outputs are the
// ports that connect to them.
module sit_dem_top
  import dem_pkg::*;
#(
  parameter int unsigned  M     = M_DEFAULT,
  parameter int unsigned  L     = L_DEFAULT,
  parameter shape_order_e ORDER = SHAPE_ORDER1,
  localparam int unsigned DW    = $clog2(M + 1),
  localparam int unsigned KW    = $clog2(L + 2) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // direct form
  input  logic          en_i,
  input  logic [DW-1:0] d_i,
  output logic [M-1:0]  elem_o,
  output logic [KW-1:0] k_o,
  output logic [DW-1:0] gamma_o,
  output logic          fallback_o,
  // tree form
  input  logic          t_en_i,
  input  logic [DW-1:0] t_d_i,
  output logic [M-1:0]  t_elem_o,
  output logic [KW-1:0] t_k_o,
  output logic [DW-1:0] t_gamma_o,
  output logic          t_fallback_o
);

  dem_core #(.M(M), .L(L), .ORDER(ORDER)) u_direct (
    .clk, .rst_n, .en_i, .d_i,
    .elem_o, .k_o, .gamma_o, .fallback_o
  );

  dem_tree #(.M(M), .L(L), .ORDER(ORDER)) u_tree (
    .clk, .rst_n, .en_i(t_en_i), .d_i(t_d_i),
    .elem_o(t_elem_o), .k_o(t_k_o), .gamma_o(t_gamma_o), .fallback_o(t_fallback_o)
  );

endmodule
