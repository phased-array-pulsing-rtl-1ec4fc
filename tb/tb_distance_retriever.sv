// tb_distance_retriever: random rise times for the four middle channels,
// random offset b. Checks r = clamp(((285 * mean) >> 14) + b, 0, 1023)
// with mean = sum/4 truncated, done exactly 4 clocks after the clock that
// takes start, and in reprogram mode b_cal = 300 - ((285*mean)>>14) with
// cal_valid pulsing, and r then equal to 300.
module tb_distance_retriever;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0, reprogram = 0, cal_valid, done;
  logic [15:0] t1_mid [4];
  logic [9:0] a = 10'd285, r;
  logic signed [9:0] b = 0, b_cal;
  always #5 clk = ~clk;
  distance_retriever dut (.clk, .rst, .start, .reprogram, .t1_mid, .a, .b, .r, .b_cal, .cal_valid, .done);

  initial begin #5_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int mean, rc, expr, lat, cv;
    foreach (t1_mid[i]) t1_mid[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 500; i++) begin
      mean = $urandom_range(600, 32000);
      for (int k = 0; k < 4; k++) t1_mid[k] = 16'(mean + $urandom_range(0, 40) - 20);
      b <= 10'($urandom_range(0, 200) - 100);
      reprogram <= (i % 5 == 4);
      @(posedge clk);
      start <= 1; @(posedge clk); start <= 0;
      mean = (t1_mid[0] + t1_mid[1] + t1_mid[2] + t1_mid[3]) / 4;
      rc = (285 * mean) >> 14;
      expr = reprogram ? 300 : rc + b;
      if (expr < 0) expr = 0;
      if (expr > 1023) expr = 1023;
      lat = 0; cv = 0;
      do begin @(posedge clk); #1; lat++; if (cal_valid) cv++; end while (!done && lat < 20);
      `CHECK(lat == 4, $sformatf("done after %0d clocks", lat))
      `CHECK(r == 10'(expr), $sformatf("r %0d expected %0d (mean %0d b %0d)", r, expr, mean, b))
      if (reprogram) begin
        `CHECK(cv == 1 && b_cal == 10'(300 - rc), $sformatf("b_cal %0d expected %0d", b_cal, 300 - rc))
      end else `CHECK(cv == 0, "no calibration outside reprogram")
    end
    `TB_FINISH
  end
endmodule
