// channel_pipeline: one of the twelve receiver channels.
// delta-sigma bit -> ds_reconstruct (16-bit waveform at 64.8 MHz)
// -> bpf_65mhz (low-pass, DC block, anti-alias FIR)
// -> downsample_filter (1 MHz samples, DC block, FIR, 21 bits)
// -> edge_detect (compare with the shared threshold, 12-sample hold).
// The echo bit goes to the echo buffer; the 1 MHz sample is also brought out
// for observation.
module channel_pipeline (
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  logic               adc_in,
  output logic               adc_out,
  input  logic signed [20:0] threshold,
  output logic               detect,
  output logic signed [20:0] sample
);
  logic signed [15:0] raw, filt;

  ds_reconstruct    u_ds  (.clk(clk), .rst(rst), .adc_in(adc_in), .adc_out(adc_out), .data_out(raw));
  bpf_65mhz         u_bpf (.clk(clk), .rst(rst), .din(raw), .dout(filt));
  downsample_filter u_dsf (.clk(clk), .rst(rst), .sample_en(tick), .din(filt), .dout(sample));
  edge_detect       u_det (.clk(clk), .rst(rst), .tick(tick), .threshold(threshold), .din(sample), .detect(detect));
endmodule
