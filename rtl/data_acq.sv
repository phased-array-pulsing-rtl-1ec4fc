// data_acq: the data acquisition block.
// Three timing signals drive it: the system clock, the ~1 MHz sample enable
// (clock / MHZ_DIV) and the 30 Hz frame trigger (clock / FRAME_DIV, gated by
// tx_enable). The trigger fires the 16-cycle 40 kHz transmit burst, resets
// the threshold generator to its maximum and rewinds the echo buffer address.
// Each of the NUM_CH receiver channels reconstructs, filters and down-samples
// its delta-sigma stream and compares it with the shared threshold; the
// channels' echo bits form one row, written on every 1 MHz tick. acq_done
// pulses when the last row of the frame is written.
module data_acq #(
  parameter int unsigned NUM_CH    = 12,
  parameter int unsigned MHZ_DIV   = 64,
  parameter int unsigned FRAME_DIV = 2_160_000,
  parameter int unsigned AW        = 15
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tx_enable,
  input  logic [NUM_CH-1:0]  adc_in,
  output logic [NUM_CH-1:0]  adc_out,
  output logic [1:0]         pulse_out,
  output logic               mhz_tick,
  output logic               frame_tick,
  output logic [AW-1:0]      waddr,
  output logic               we,
  output logic [NUM_CH-1:0]  wdata,
  output logic               acq_done,
  output logic signed [20:0] threshold
);
  logic trigger, tx_busy;
  logic [NUM_CH-1:0] detect;

  enable_divider #(.DIV(MHZ_DIV))   u_mhz   (.clk(clk), .rst(rst), .tick(mhz_tick));
  enable_divider #(.DIV(FRAME_DIV)) u_frame (.clk(clk), .rst(rst), .tick(frame_tick));

  assign trigger = frame_tick && tx_enable;

  pulse_gen_40khz u_pulse (.clk(clk), .rst(rst), .trigger(trigger),
                           .out_p(pulse_out[1]), .out_m(pulse_out[0]), .busy(tx_busy));

  threshold_gen u_thr (.clk(clk), .rst(rst), .frame_start(trigger), .tick(mhz_tick),
                       .threshold(threshold));

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    logic signed [20:0] sample;
    channel_pipeline u_ch (.clk(clk), .rst(rst), .tick(mhz_tick), .adc_in(adc_in[c]),
                           .adc_out(adc_out[c]), .threshold(threshold),
                           .detect(detect[c]), .sample(sample));
  end

  echo_addr_gen #(.AW(AW)) u_addr (.clk(clk), .rst(rst), .frame_start(trigger), .tick(mhz_tick),
                                   .addr(waddr), .we(we), .full(acq_done));

  // Row registered alongside the address so both describe the same tick.
  always_ff @(posedge clk)
    if (mhz_tick) wdata <= detect;
endmodule
