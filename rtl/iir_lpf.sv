// iir_lpf: single-pole IIR low-pass filter (exponential weighted average).
//   y[n] = y[n-1] - y[n-1]/2^SHIFT + x[n-1]/2^SHIFT
// The state is 32 bits with the 16-bit input placed in the upper half; the
// output is bits [30:15], i.e. the filtered value times two. The filter
// advances only when en is high, so the same module serves at the full clock
// rate and at the 1 MHz sample rate. Used after the delta-sigma
// reconstruction to remove its saw-tooth ripple.
// Latency: the input is registered, the output follows two enables later.
module iir_lpf #(
  parameter int unsigned SHIFT = 6
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic signed [15:0] din,
  output logic signed [15:0] dout
);
  logic signed [31:0] x0, y0;

  always_ff @(posedge clk) begin
    if (rst) begin
      x0 <= '0;
      y0 <= '0;
    end else if (en) begin
      x0 <= {din, 16'b0};
      y0 <= y0 - (y0 >>> SHIFT) + (x0 >>> SHIFT);
    end
  end

  assign dout = y0[30:15];
endmodule
