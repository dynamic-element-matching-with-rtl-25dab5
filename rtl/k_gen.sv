// k_gen: generator of K[n], the total number of element transitions.
//
// K[n] must have the parity of (d[n] - d[n-1]) so that Gamma[n] =
// (K[n] + d[n] - d[n-1]) / 2 is an integer. An XOR of the low bits of L,
// d[n] and d[n-1] gives that parity. When (L + d[n] - d[n-1]) is even the
// ternary modulator output y[n] is forced to 0 and K[n] = L; when it is odd
// y[n] is +1 or -1 and K[n] = L + y[n]. y[n] comes from a small delta-sigma
// loop with zero input, so y[n] (and K[n] - L) is high-pass shaped:
//   ORDER = 1 : x1 accumulates -y, the quantizer sees x1          (Fig. 2)
//   ORDER = 2 : x2 accumulates x1, the quantizer sees 4*x1 + x2   (Fig. 15)
// The second-order loop adds an integrator and a feed-forward path from the
// first integrator to the quantizer. The feed-forward weight is this
// design's choice: the textbook weight 2 (NTF = (1 - z^-1)^2) leaves this
// loop barely stable, because it can only act on the odd-parity samples,
// about half of them; a weight of 4 keeps the double sum of y[n] within a
// few tens, so K[n] - L keeps its 40 dB/decade slope in band. The quantizer is the sign of its input plus a
// dither of +/- 1/2 LSB (dither_i), which decides ties at zero.
//
// Interface: d_i and d_prev_i are the current and previous codes (0..M).
// y_o, k_o and odd_o are combinational from them and the loop state. The
// state advances on a clock with en_i high and hold_i low; hold_i is raised
// by the encoder in the cycles where it cannot realise K[n] and falls back
// to plain mismatch shaping, so those cycles do not disturb the loop.
module k_gen
  import dem_pkg::*;
#(
  parameter int unsigned  M     = M_DEFAULT,
  parameter int unsigned  L     = L_DEFAULT,
  parameter shape_order_e ORDER = SHAPE_ORDER1,
  parameter int unsigned  IW    = 8,                  // integrator width
  localparam int unsigned DW    = $clog2(M + 1),
  localparam int unsigned KW    = $clog2(L + 2) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_i,
  input  logic                 hold_i,
  input  logic [DW-1:0]        d_i,
  input  logic [DW-1:0]        d_prev_i,
  input  logic                 dither_i,
  output logic                 odd_o,
  output logic signed [1:0]    y_o,
  output logic [KW-1:0]        k_o
);

  localparam logic L_LSB = 1'(L % 2);

  logic signed [IW-1:0] x1, x2;
  logic signed [IW+2:0] q;      // quantizer input, doubled, plus dither

  assign odd_o = L_LSB ^ d_i[0] ^ d_prev_i[0];

  always_comb begin
    if (ORDER == SHAPE_ORDER2) q = 8 * (IW+3)'(x1) + 2 * (IW+3)'(x2);
    else                       q = 2 * (IW+3)'(x1);
    q = q + (dither_i ? (IW+3)'(1) : -(IW+3)'(1));
    if (!odd_o)      y_o = 2'sd0;
    else if (q >= 0) y_o = 2'sd1;
    else             y_o = -2'sd1;
  end

  assign k_o = KW'(L) + KW'(y_o);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
    end else if (en_i && !hold_i) begin
      x1 <= IW'(sat_add(32'(x1), -32'(y_o), IW));
      if (ORDER == SHAPE_ORDER2) x2 <= IW'(sat_add(32'(x2), 32'(x1), IW));
    end
  end

endmodule
