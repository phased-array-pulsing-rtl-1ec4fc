// tb_distance_calc: random screen points; dist must be
// floor(sqrt((x-512)^2 + (y-384)^2)) and valid must come within 16 clocks
// of start.
module tb_distance_calc;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0, valid;
  logic [10:0] x = 0;
  logic [9:0] y = 0, dist_px;
  always #5 clk = ~clk;
  distance_calc dut (.clk, .rst, .start, .x, .y, .dist_px, .valid);

  initial begin #5_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int xx, yy, e, lat;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      xx = $urandom_range(0, 1023); yy = $urandom_range(0, 767);
      if (i == 0) begin xx = 512; yy = 384; end
      if (i == 1) begin xx = 0; yy = 0; end
      @(negedge clk); x = 11'(xx); y = 10'(yy); start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!valid && lat < 40) begin @(negedge clk); lat++; end
      e = $floor($sqrt(real'((xx - 512) * (xx - 512) + (yy - 384) * (yy - 384))));
      `CHECK(lat <= 16, $sformatf("valid after %0d", lat))
      `CHECK(dist_px == 10'(e), $sformatf("(%0d,%0d) dist %0d expected %0d", xx, yy, dist_px, e))
    end
    `TB_FINISH
  end
endmodule
