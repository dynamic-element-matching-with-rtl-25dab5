// dem_pkg: constants and helper types shared by the DEM encoder modules.
//
// The encoder drives a thermometer-weighted unit-element DAC of M elements
// from a multibit delta-sigma code d[n] in 0..M. Each clock it decides how
// many elements switch (K[n], the total of up and down transitions) and how
// many switch on (Gamma[n]), then picks which elements by their usage.
// The defaults are the 32-element DAC of the evaluated system and an average
// transition count L = 4; both are module parameters everywhere.
package dem_pkg;

  localparam int unsigned M_DEFAULT = 32;  // unit elements of the DAC
  localparam int unsigned L_DEFAULT = 4;   // long-term average of K[n]

  // Order of the K[n] modulator and of the element usage filter.
  typedef enum logic [0:0] {
    SHAPE_ORDER1 = 1'b0,
    SHAPE_ORDER2 = 1'b1
  } shape_order_e;

  // Saturating add of two signed values, limited to a W-bit signed range.
  // Used by every integrator of the design so that none can wrap around.
  function automatic logic signed [31:0] sat_add(input logic signed [31:0] a,
                                                 input logic signed [31:0] b,
                                                 input int unsigned w);
    logic signed [32:0] s;
    logic signed [32:0] hi;
    logic signed [32:0] lo;
    s  = 33'(a) + 33'(b);
    hi = (33'sd1 <<< (w - 1)) - 33'sd1;
    lo = -(33'sd1 <<< (w - 1));
    if (s > hi)      return 32'(hi);
    else if (s < lo) return 32'(lo);
    else             return 32'(s);
  endfunction

endpackage
