// usage_filter: per-element mismatch-shaping loop filter of the encoder.
//
// It tracks how much each unit element has been used relative to the
// average, so the vector quantizers can prefer the least used elements.
// For element i the usage error of sample n is
//   e_i[n] = M * d_i[n] - d[n]
// (M times the selection bit minus the code, so the errors of all elements
// sum to zero and no fractions appear). Integrators of -e_i give the keys:
//   ORDER = 1 : x1_i += -e_i, key_i = x1_i                    (Fig. 3)
//   ORDER = 2 : x2_i += x1_i, key_i = 2*x1_i + x2_i           (Fig. 16)
// A larger key means an element that has been used less. With ORDER = 1 the
// key is -M times the element's use count minus its share, i.e. the
// integrator 1/(1 - z^-1) of the usage. The second-order filter is the
// loop filter that makes each element's mismatch error (1 - z^-1)^2 shaped;
// its form is this design's choice. All integrators saturate at UW bits.
//
// Interface: sel_i is the selection d_i[n] applied this cycle and d_i its
// count; on a clock with en_i high the filter state absorbs it. key_o is
// registered state (for ORDER = 2 a sum of two registers), valid for the
// next sample.
module usage_filter
  import dem_pkg::*;
#(
  parameter int unsigned  M     = M_DEFAULT,
  parameter shape_order_e ORDER = SHAPE_ORDER1,
  parameter int unsigned  UW    = 16,
  localparam int unsigned DW    = $clog2(M + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_i,
  input  logic [M-1:0]         sel_i,
  input  logic [DW-1:0]        d_i,
  output logic signed [UW-1:0] key_o [M]
);

  logic signed [UW-1:0] x1 [M];
  logic signed [UW-1:0] x2 [M];

  always_ff @(posedge clk) begin
    for (int i = 0; i < M; i++) begin
      if (!rst_n) begin
        x1[i] <= '0;
        x2[i] <= '0;
      end else if (en_i) begin
        // -e_i = d - M * d_i
        x1[i] <= UW'(sat_add(32'(x1[i]),
                             32'(d_i) - (sel_i[i] ? 32'(M) : 32'sd0), UW));
        if (ORDER == SHAPE_ORDER2)
          x2[i] <= UW'(sat_add(32'(x2[i]), 32'(x1[i]), UW));
      end
    end
  end

  always_comb begin
    for (int i = 0; i < M; i++) begin
      if (ORDER == SHAPE_ORDER2)
        key_o[i] = UW'(sat_add(2 * 32'(x1[i]), 32'(x2[i]), UW));
      else
        key_o[i] = x1[i];
    end
  end

endmodule
