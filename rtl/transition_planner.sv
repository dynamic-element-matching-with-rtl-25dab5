// transition_planner: number of elements to switch on and to keep on.
//
// From K[n] and the codes d[n], d[n-1] it forms
//   Gamma[n] = (K[n] + d[n] - d[n-1]) / 2      elements turned on   (eq. 6)
//   keep[n]  = d[n] - Gamma[n]                 elements kept on
// and checks that both steps can be carried out:
//   K[n] <= 2M - d[n] - d[n-1]                 enough elements off  (eq. 7)
//   d[n] - d[n-1] <= K[n] <= d[n] + d[n-1]     enough elements on   (eq. 8)
//   d[n-1] - d[n] <= K[n]                      Gamma[n] not negative
// together with an even sum (K[n] from k_gen always has the right parity).
// If any check fails, fallback_o is raised: the encoder then stops
// controlling the transitions for that sample and selects d[n] elements by
// usage alone, as a conventional mismatch-shaping encoder would. In that
// case gamma_o and keep_o are not used.
//
// Purely combinational.
module transition_planner
  import dem_pkg::*;
#(
  parameter int unsigned  M  = M_DEFAULT,
  parameter int unsigned  KW = 4,
  localparam int unsigned DW = $clog2(M + 1)
) (
  input  logic [DW-1:0] d_i,
  input  logic [DW-1:0] d_prev_i,
  input  logic [KW-1:0] k_i,
  output logic [DW-1:0] gamma_o,
  output logic [DW-1:0] keep_o,
  output logic          fallback_o
);

  localparam int unsigned SW = (DW > KW ? DW : KW) + 3;

  logic signed [SW-1:0] d, dp, k, sum, gam, kp;

  always_comb begin
    d   = SW'(d_i);
    dp  = SW'(d_prev_i);
    k   = SW'(k_i);
    sum = k + d - dp;
    gam = sum >>> 1;
    kp  = d - gam;
    fallback_o = sum[0]
              || (k > SW'(2 * M) - d - dp)
              || (k < d - dp)
              || (k < dp - d)
              || (k > d + dp);
    gamma_o = fallback_o ? '0 : DW'(gam);
    keep_o  = fallback_o ? '0 : DW'(kp);
  end

endmodule
