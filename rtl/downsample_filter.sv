// downsample_filter: takes one sample of the full-rate waveform on each
// ~1 MHz enable and filters the sample stream with a DC-blocking IIR high-pass
// (SHIFT 6) and the triangle FIR. All 21 FIR bits are passed on to the echo
// threshold comparison (gain: x2 from the high-pass, x32 at DC from the FIR).
module downsample_filter (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_en,
  input  logic signed [15:0] din,
  output logic signed [20:0] dout
);
  logic signed [15:0] hp;

  iir_hpf #(.SHIFT(6)) u_hpf (.clk(clk), .rst(rst), .en(sample_en), .din(din), .dout(hp));
  tri_fir              u_fir (.clk(clk), .rst(rst), .en(sample_en), .din(hp),  .dout(dout));
endmodule
