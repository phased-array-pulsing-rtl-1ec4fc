// tb_channel_pipeline: one receiver channel in closed loop with the
// behavioural delta-sigma front end, 1 MHz tick every 64 cycles.
// Phase 1: 3 ms of silence (small noise) with the largest threshold 131072:
// the channel must not detect. Phase 2: a 40 kHz echo burst of 16 periods:
// detect must rise within 40 ticks of the burst start and every detection
// lasts a multiple of 12 ticks. Also checks sample changes only on ticks.
module tb_channel_pipeline;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, tick = 0, adc_in, adc_out, detect;
  logic signed [20:0] threshold = 21'sd131072, sample, prev;
  real ain = 0.0;
  int  cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= (cyc % 64 == 63);
  end
  channel_pipeline dut (.clk, .rst, .tick, .adc_in, .adc_out, .threshold, .detect, .sample);
  ds_frontend_model fe (.clk, .ain, .fb(adc_out), .comp(adc_in));

  initial begin #80_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int ticks, first, run, peak, false_hits;
    logic tick_before;
    int noise;
    repeat (2) @(posedge clk);
    rst <= 0;
    // settle 1 ms, then watch 3 ms of noise
    false_hits = 0;
    for (int i = 0; i < 64 * 4000; i++) begin
      noise = $urandom_range(0, 200);
      ain = 0.01 * (noise - 100) / 100.0;
      prev = sample;
      tick_before = tick;
      @(posedge clk); #1;
      if (i > 64 * 1000 && detect) false_hits++;
      if (!tick_before && i % 11 == 0) `CHECK(sample == prev, "sample holds between ticks")
    end
    `CHECK(false_hits == 0, $sformatf("detections on noise: %0d", false_hits))
    // echo burst
    ticks = 0; first = -1; run = 0; peak = 0;
    for (int i = 0; i < 64 * 200; i++) begin
      ain = (i < 1620 * 16) ? 0.3 * $sin(2.0 * 3.14159265 * i / 1620.0) : 0.0;
      @(posedge clk); #1;
      if (tick) begin
        ticks++;
        if (sample > peak) peak = sample;
        if (detect) begin
          run++;
          if (first < 0) first = ticks;
        end else begin
          if (run > 0) `CHECK(run % 12 == 0, $sformatf("detect lasted %0d ticks", run))
          run = 0;
        end
      end
    end
    $display("echo: first detect after %0d ticks, peak sample %0d", first, peak);
    `CHECK(first > 0 && first < 40, "echo detected promptly")
    `TB_FINISH
  end
endmodule
