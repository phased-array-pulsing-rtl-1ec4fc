// tb_sonar_grid: loads a random quadrant bitmap through the write port,
// then checks random screen pixels: two clocks after (hcount, vcount) the
// pixel must be 0x2E8B57 when the folded quadrant bit is set (x' = 1023-x
// on the right half, y' = 767-y on the bottom half) and black otherwise,
// and black outside 1024x768. Also checks the mirror symmetry directly.
module tb_sonar_grid;
  `include "tb_util.svh"
  logic clk = 0, we = 0, wdata = 0;
  logic [17:0] waddr = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic [23:0] pixel;
  logic bm [512*384];
  always #5 clk = ~clk;
  sonar_grid dut (.clk, .hcount, .vcount, .pixel, .we, .waddr, .wdata);

  initial begin #50_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  function automatic logic [23:0] expect_px(int h, int v);
    int xf, yf;
    if (h >= 1024 || v >= 768) return 24'h0;
    xf = h < 512 ? h : 1023 - h;
    yf = v < 384 ? v : 767 - v;
    return bm[yf * 512 + xf] ? 24'h2E8B57 : 24'h0;
  endfunction

  initial begin
    int hq [3], vq [3];
    for (int a = 0; a < 512 * 384; a++) begin
      @(negedge clk); we = 1; waddr = 18'(a); wdata = ($urandom_range(0, 3) == 0); bm[a] = wdata;
    end
    @(negedge clk); we = 0;
    hq = '{0, 0, 0}; vq = '{0, 0, 0};
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      hq[2] = hq[1]; hq[1] = hq[0]; hq[0] = $urandom_range(0, 1343);
      vq[2] = vq[1]; vq[1] = vq[0]; vq[0] = $urandom_range(0, 805);
      hcount = 11'(hq[0]); vcount = 10'(vq[0]);
      #1;
      if (i >= 2) `CHECK(pixel == expect_px(hq[2], vq[2]), $sformatf("pixel at (%0d,%0d) %h", hq[2], vq[2], pixel))
    end
    `TB_FINISH
  end
endmodule
