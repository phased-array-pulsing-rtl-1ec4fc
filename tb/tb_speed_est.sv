// tb_speed_est: with a short sample period of 100 clocks, feeds distances
// that change by random amounts between samples and checks speed equals
// (sum of the last ten |changes|) * 6554 >> 16 after each sample; also
// checks that a constant distance brings the estimate to zero after ten
// samples.
module tb_speed_est;
  `include "tb_util.svh"
  logic clk = 0, rst = 1;
  logic [9:0] dist_px = 0, speed;
  always #5 clk = ~clk;
  speed_est #(.SAMPLE_CYCLES(100)) dut (.clk, .rst, .dist_px, .speed);

  initial begin #20_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int hist [10], prev, d, sum, e;
    foreach (hist[i]) hist[i] = 0;
    prev = 0; d = 500;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 300; s++) begin
      if (s < 280) d = d + $urandom_range(0, 40) - 20;
      if (d < 0) d = 0; if (d > 1023) d = 1023;
      // change the distance early in a period, check early in the next one
      do @(negedge clk); while (dut.cnt != 10);
      dist_px = 10'(d);
      do @(negedge clk); while (dut.cnt != 5);
      for (int i = 9; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = (d > prev) ? d - prev : prev - d;
      prev = d;
      sum = 0; foreach (hist[i]) sum += hist[i];
      e = (sum * 6554) >> 16;
      `CHECK(speed == 10'(e), $sformatf("sample %0d speed %0d expected %0d", s, speed, e))
    end
    `CHECK(speed == 0, "constant distance gives zero speed")
    `TB_FINISH
  end
endmodule
