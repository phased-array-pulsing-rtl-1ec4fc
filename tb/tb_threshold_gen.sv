// tb_threshold_gen: checks the time-varying threshold. With a tick every 40
// cycles (the divider needs 28) it follows a frame of 25,000 ticks and
// compares threshold after each tick with the law: MAX_THRESHOLD (131072)
// until t > 4608, then 2^27 / ((t-512)>>7)^2 of the previous tick's count,
// never below MIN_THRESHOLD (4096); it must reach the minimum. A second
// frame_start must restore MAX_THRESHOLD at once.
module tb_threshold_gen;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, frame_start = 0, tick = 0;
  logic signed [20:0] threshold;
  always #5 clk = ~clk;
  threshold_gen dut (.clk, .rst, .frame_start, .tick, .threshold);

  initial begin #30_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  function automatic longint law(int t);
    int tp = (t > 4608) ? (t - 512) >>> 7 : 32;
    return (longint'(1) << 27) / (tp * tp);
  endfunction

  initial begin
    longint held, expv;
    int hit_min;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    frame_start <= 1; @(posedge clk); frame_start <= 0;
    #1;
    `CHECK(threshold == 131072, "MAX after frame start")
    held = 131072; hit_min = 0;
    for (int t = 0; t < 25000; t++) begin
      repeat (39) @(posedge clk);
      tick <= 1; @(posedge clk); tick <= 0; #1;
      expv = (held > 4096) ? held : 4096;
      `CHECK(threshold == 21'(expv), $sformatf("t=%0d threshold %0d expected %0d", t, threshold, expv))
      held = law(t);
      if (threshold == 4096) hit_min++;
    end
    `CHECK(hit_min > 100, "threshold reached its minimum")
    frame_start <= 1; @(posedge clk); frame_start <= 0; #1;
    `CHECK(threshold == 131072, "MAX restored by a new frame")
    `TB_FINISH
  end
endmodule
