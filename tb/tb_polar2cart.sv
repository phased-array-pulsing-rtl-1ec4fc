// tb_polar2cart: random ranges and signed cosines are written into random
// object slots. Checks x = 512 + (r*cos >>> 9) and
// y = 384 - ((r*sin) >> 9), sin = floor(sqrt(2^18 - cos^2)), clamped to the
// screen, that other slots keep their values and that done comes within 20
// clocks of start.
module tb_polar2cart;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0, done;
  logic [9:0] r = 0;
  logic signed [9:0] cos_theta = 0;
  logic [3:0] obj_num = 0;
  logic [10:0] x [10];
  logic [9:0]  y [10];
  int ex [10], ey [10];
  always #5 clk = ~clk;
  polar2cart dut (.clk, .rst, .start, .r, .cos_theta, .obj_num, .x, .y, .done);

  initial begin #5_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int lat, c, s, xx, yy, rr, k;
    foreach (ex[i]) begin ex[i] = 0; ey[i] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 600; i++) begin
      rr = $urandom_range(0, 1023);
      c  = $urandom_range(0, 1022); c = c - 511;
      k  = $urandom_range(0, 9);
      @(negedge clk); r = 10'(rr); cos_theta = 10'(c); obj_num = 4'(k); start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      s  = $floor($sqrt(262144.0 - c * c));
      xx = 512 + ((rr * c) >>> 9);
      yy = 384 - ((rr * s) >> 9);
      ex[k] = xx < 0 ? 0 : xx > 1023 ? 1023 : xx;
      ey[k] = yy < 0 ? 0 : yy > 767 ? 767 : yy;
      `CHECK(lat <= 20, $sformatf("done after %0d", lat))
      for (int j = 0; j < 10; j++)
        `CHECK(x[j] == 11'(ex[j]) && y[j] == 10'(ey[j]),
               $sformatf("slot %0d (%0d,%0d) expected (%0d,%0d)", j, x[j], y[j], ex[j], ey[j]))
    end
    `TB_FINISH
  end
endmodule
