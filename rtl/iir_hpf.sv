// iir_hpf: single-pole IIR high-pass filter (DC blocker).
//   y[n] = y[n-1] - y[n-1]/2^SHIFT + (x[n-1] - x[n-2])
// 32-bit state with the input in the upper half; output bits [30:15] (the
// filtered value times two). Clock-enabled like iir_lpf. Used with SHIFT = 10
// at the full clock rate and SHIFT = 6 after down-sampling to remove the DC
// bias left by the delta-sigma reconstruction.
module iir_hpf #(
  parameter int unsigned SHIFT = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic signed [15:0] din,
  output logic signed [15:0] dout
);
  logic signed [31:0] x0, x1, y0;

  always_ff @(posedge clk) begin
    if (rst) begin
      x0 <= '0;
      x1 <= '0;
      y0 <= '0;
    end else if (en) begin
      x0 <= {din, 16'b0};
      x1 <= x0;
      y0 <= y0 - (y0 >>> SHIFT) + (x0 - x1);
    end
  end

  assign dout = y0[30:15];
endmodule
