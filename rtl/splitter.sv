// splitter: divides a code d[n] in 0..M between two half-size encoders.
//
// Used by the reduced-complexity (tree) form of the encoder: the M-element
// DAC is treated as two M/2-element halves, each with its own encoder.
// The splitter outputs
//   d_a[n] = (d[n] + s[n]) / 2,   d_b[n] = (d[n] - s[n]) / 2
// where s[n] = 0 for even d[n], and s[n] = +1 or -1 for odd d[n], chosen by
// a first-order delta-sigma loop with zero input (the integrator x holds
// -sum(s), the quantizer is the sign of x plus a +/- 1/2 LSB dither). The
// split difference d_a - d_b = s is therefore first-order high-pass shaped
// and the two halves are used equally on average. The loop form and the
// dither are this design's choice.
//
// Interface: combinational outputs from d_i and the loop state; the state
// advances on a clock with en_i high. Active-low synchronous reset.
module splitter
  import dem_pkg::*;
#(
  parameter int unsigned  M   = M_DEFAULT,
  localparam int unsigned DW  = $clog2(M + 1),
  localparam int unsigned HW  = $clog2(M / 2 + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en_i,
  input  logic [DW-1:0] d_i,
  input  logic          dither_i,
  output logic [HW-1:0] d_a_o,
  output logic [HW-1:0] d_b_o
);

  logic signed [3:0]  x;      // -sum(s), stays within -1..1
  logic signed [1:0]  s;
  logic [DW:0]        da2, db2;

  always_comb begin
    if (!d_i[0])                           s = 2'sd0;
    else if (2 * x + (dither_i ? 4'sd1 : -4'sd1) >= 0) s = 2'sd1;
    else                                   s = -2'sd1;
    da2   = (DW+1)'(d_i) + (DW+1)'(s);
    db2   = (DW+1)'(d_i) - (DW+1)'(s);
    d_a_o = HW'(da2 >> 1);
    d_b_o = HW'(db2 >> 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    x <= '0;
    else if (en_i) x <= 4'(sat_add(32'(x), -32'(s), 4));
  end

endmodule
