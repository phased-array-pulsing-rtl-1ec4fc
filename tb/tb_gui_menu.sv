// tb_gui_menu: mode selection and drawing of the menu.
// Clicks: a left click with the mouse on item 1, 2 or 3 (x >= 925, y in
// 235-334, 335-434, 435-534) selects mode 1, 2 or 3; a left click elsewhere
// changes nothing; a right click returns to mode 0. Drawing, two clocks
// after (hcount, vcount): white frame on x 920-921 and 1020-1021, y 230-234
// and 535-539 and the separators at y 333-334 and 433-434; the item under
// the mouse blue, the selected item grey, black elsewhere and everywhere
// when show is low.
module tb_gui_menu;
  `include "tb_util.svh"
  import sonar_pkg::*;
  logic clk = 0, rst = 1, left_click = 0, right_click = 0, show = 1;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic [11:0] mx = 0, my = 0;
  ui_mode_e mode;
  logic [23:0] pixel;
  always #5 clk = ~clk;
  gui_menu dut (.clk, .rst, .hcount, .vcount, .mx, .my, .left_click, .right_click, .show, .mode, .pixel);

  initial begin #20_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  function automatic int item_of(int px, int py, int xmin);
    if (px < xmin || px >= 1020 || py < 235 || py >= 535) return 0;
    return (py < 335) ? 1 : (py < 435) ? 2 : 3;
  endfunction

  function automatic logic [23:0] draw(int h, int v, int hov, int md, logic sh);
    logic border;
    int it;
    if (!sh) return 24'h0;
    border = (h >= 920 && h < 1022 && v >= 230 && v < 540) &&
             (h < 922 || h >= 1020 || v < 235 || v >= 535 || (v >= 333 && v < 335) || (v >= 433 && v < 435));
    it = item_of(h, v, 922);
    if (border) return 24'hFFFFFF;
    if (it != 0 && it == hov) return 24'h0000A0;
    if (it != 0 && it == md) return 24'h404040;
    return 24'h0;
  endfunction

  initial begin
    int em, xx, yy, hq [3], vq [3], hov;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    `CHECK(mode == MODE_NORMAL, "starts in normal mode")
    em = 0;
    for (int i = 0; i < 400; i++) begin
      xx = $urandom_range(850, 1023); yy = $urandom_range(200, 560);
      @(negedge clk); mx = 12'(xx); my = 12'(yy);
      if ($urandom_range(0, 4) == 0) begin right_click = 1; em = 0; end
      else begin left_click = 1; if (item_of(xx, yy, 925) != 0) em = item_of(xx, yy, 925); end
      @(negedge clk); left_click = 0; right_click = 0;
      `CHECK(int'(mode) == em, $sformatf("click at (%0d,%0d) mode %0d expected %0d", xx, yy, mode, em))
    end
    // drawing, mouse parked on a random point of the menu
    hq = '{0, 0, 0}; vq = '{0, 0, 0};
    for (int i = 0; i < 40000; i++) begin
      if (i % 5000 == 0) begin
        @(negedge clk);
        mx = 12'($urandom_range(900, 1023)); my = 12'($urandom_range(220, 560));
        show = (i != 20000);
        repeat (3) @(negedge clk);
        hq = '{0, 0, 0}; vq = '{0, 0, 0};
      end
      @(negedge clk);
      hq[2] = hq[1]; hq[1] = hq[0]; hq[0] = $urandom_range(900, 1030);
      vq[2] = vq[1]; vq[1] = vq[0]; vq[0] = $urandom_range(220, 560);
      hcount = 11'(hq[0]); vcount = 10'(vq[0]);
      #1;
      hov = item_of(int'(mx), int'(my), 925);
      if (i % 5000 >= 3)
        `CHECK(pixel == draw(hq[2], vq[2], hov, int'(mode), show),
               $sformatf("(%0d,%0d) pixel %h expected %h", hq[2], vq[2], pixel, draw(hq[2], vq[2], hov, int'(mode), show)))
    end
    `TB_FINISH
  end
endmodule
