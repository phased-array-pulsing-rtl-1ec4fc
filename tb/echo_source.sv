// echo_source: test-bench stimulus for the twelve receiver channels.
// Holds one ds_frontend_model per channel and drives its analog input with
// uniform noise of amplitude NOISE plus, after every trigger pulse, a 40 kHz echo burst
// (16 periods of 1620 clocks, amplitude 0.3) that starts ECHO_US
// microseconds (64 clocks each) after the trigger on channel 0 and SKEW
// clocks later on each following channel, as a wave front arriving at an
// angle. echo_en can switch the echo off. Behavioural only.
module echo_source #(
  parameter int NUM_CH  = 12,
  parameter int ECHO_US = 3000,
  parameter int SKEW    = 40,
  parameter real NOISE  = 0.001
) (
  input  logic              clk,
  input  logic              trig,
  input  logic              echo_en,
  input  logic [NUM_CH-1:0] fb,
  output logic [NUM_CH-1:0] comp
);
  real    ain [NUM_CH];
  longint cyc = 0, t_trig = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (trig) t_trig <= cyc;
  end

  for (genvar c = 0; c < NUM_CH; c++) begin : g_fe
    ds_frontend_model fe (.clk, .ain(ain[c]), .fb(fb[c]), .comp(comp[c]));
  end

  always @(posedge clk) begin
    for (int c = 0; c < NUM_CH; c++) begin
      real t;
      int  n;
      n = $urandom_range(0, 100);
      ain[c] = NOISE * (n - 50) / 50.0;
      if (t_trig >= 0 && echo_en) begin
        t = real'(cyc - t_trig - longint'(ECHO_US) * 64 - c * SKEW);
        if (t >= 0 && t < 1620.0 * 16) ain[c] += 0.3 * $sin(2.0 * 3.14159265 * t / 1620.0);
      end
    end
  end
endmodule
