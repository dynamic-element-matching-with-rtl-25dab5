// dither_lfsr: pseudo-random one-bit dither for the K[n] modulator.
//
// The K[n] modulator adds a small dither to its quantizer input to break up
// limit cycles and spurs. This block supplies it: a 16-bit maximal-length
// Fibonacci LFSR (taps 16, 15, 13, 4; period 65535) that advances once per
// enabled clock. Its output bit selects a dither of +1/2 or -1/2 LSB in the
// quantizer. The generator type, length and seed are this design's choice.
//
// Interface: clk, rst_n (active-low synchronous reset to SEED), en (advance),
// bit_o (current dither bit, registered).
module dither_lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_o
);

  logic [15:0] state;
  logic        fb;

  // Feedback of x^16 + x^15 + x^13 + x^4 + 1.
  assign fb = state[15] ^ state[14] ^ state[12] ^ state[3];

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= (SEED == 16'h0) ? 16'h1 : SEED;
    else if (en) state <= {state[14:0], fb};
  end

  assign bit_o = state[15];

endmodule
