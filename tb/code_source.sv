// code_source: testbench stimulus, a first-order digital delta-sigma
// modulator that turns a sine into codes 0..M (noise transfer function
// 1 - z^-1, largest NTF gain 2). amp_db is the amplitude in dB of full
// scale, period the sine period in samples. With burst = 1 it drives the
// code straight to full scale and back from time to time, so that an
// encoder has to leave its controlled range.
module code_source #(
  parameter int  M      = 32,
  parameter real AMP_DB = -3.0,
  parameter real PERIOD = 257.0,
  parameter bit  BURST  = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic [7:0] d
);

  real v = 0.0, u, amp;
  int  n = 0, y = 0;

  initial amp = 0.5 * M * (10.0 ** (AMP_DB / 20.0));

  always @(posedge clk) begin
    if (!rst_n) begin
      v = 0.0; n = 0; y = M / 2;
    end else if (en) begin
      n++;
      u = 0.5 * M + amp * $sin(2.0 * 3.14159265358979 * n / PERIOD);
      v = v + u - y;
      y = int'($floor(v + 0.5 + 0.25 * ($urandom_range(1000) / 1000.0 - 0.5)));
      if (y < 0) y = 0;
      if (y > M) y = M;
      if (BURST && (n % 2000) >= 1000 && (n % 2000) < 1012) y = ((n % 2000) < 1006) ? M : 0;
    end
    d <= 8'(y);
  end

endmodule
