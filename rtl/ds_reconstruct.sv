// ds_reconstruct: rebuilds the received waveform from the 1-bit delta-sigma
// stream of one channel.
// A 32-bit running sum steps up by 2^STEP_SHIFT for every 1 and down by the
// same amount for every 0, which integrates the duty-cycle variations that
// carry the 40 kHz echo. Two corrections keep it centred:
//  * bias: an up/down counter measures ones minus zeros over windows of
//    2^BIAS_WIN_BITS cycles; a running average of those counts (weight
//    1/2^BIAS_SHIFT) is subtracted from the sum every cycle, which makes the
//    effective up and down steps unequal and cancels a channel's long-term
//    bias towards ones or zeros;
//  * leak: sum >>> LEAK_SHIFT is subtracted each cycle, so the sum decays to
//    zero over the long term.
// The output is sum[26:11] (the top bits carry no signal). The synchroniser
// (ds_sync) is inside; adc_out is the feedback bit for the analog integrator.
// Latency from comp_in: 3 synchroniser cycles plus one register.
// The two mechanisms follow the document; the constants are this design's.
module ds_reconstruct #(
  parameter int unsigned STEP_SHIFT    = 16,
  parameter int unsigned LEAK_SHIFT    = 16,
  parameter int unsigned BIAS_WIN_BITS = 16,
  parameter int unsigned BIAS_SHIFT    = 6
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               adc_in,
  output logic               adc_out,
  output logic signed [15:0] data_out
);
  logic sample;
  ds_sync u_sync (.clk(clk), .comp_in(adc_in), .fb_out(adc_out), .bit_out(sample));

  logic signed [31:0] sum;
  logic signed [31:0] bias_avg;
  logic signed [BIAS_WIN_BITS+1:0] updown;
  logic [BIAS_WIN_BITS-1:0] window;

  logic signed [31:0] step;
  logic signed [BIAS_WIN_BITS+1:0] ud_step;
  assign step    = sample ? (32'sd1 <<< STEP_SHIFT) : -(32'sd1 <<< STEP_SHIFT);
  assign ud_step = sample ? (BIAS_WIN_BITS+2)'(1) : -(BIAS_WIN_BITS+2)'(1);

  always_ff @(posedge clk) begin
    if (rst) begin
      sum      <= '0;
      bias_avg <= '0;
      updown   <= '0;
      window   <= '0;
    end else begin
      sum    <= sum + step - (bias_avg >>> BIAS_SHIFT) - (sum >>> LEAK_SHIFT);
      window <= window + 1'b1;
      if (window == '0) begin
        bias_avg <= bias_avg - (bias_avg >>> BIAS_SHIFT) + 32'(updown);
        updown   <= ud_step;
      end else begin
        updown   <= updown + ud_step;
      end
    end
  end

  assign data_out = sum[26:11];
endmodule
