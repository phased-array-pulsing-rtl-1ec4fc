// tb_xvga_timing: runs two full frames at the default timing and checks
// the line length (1344 clocks), hsync low for 136 clocks starting at
// column 1048, vsync low for 6 lines starting at line 771, 806 lines per
// frame (1344*806 clocks between vsync falls) and blank exactly outside
// the 1024x768 visible area.
module tb_xvga_timing;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, hsync, vsync, blank;
  logic [10:0] hcount;
  logic [9:0] vcount;
  always #5 clk = ~clk;
  xvga_timing dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  initial begin #50_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    longint cyc = 0, last_hfall = -1, last_vfall = -1, hlow_start = 0, vlow_start = 0;
    logic ph = 1, pv = 1;
    int nv = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    while (nv < 3) begin
      @(posedge clk); #1; cyc++;
      `CHECK(blank == (hcount >= 1024 || vcount >= 768), "blank outside the visible area")
      if (!hsync && ph) begin
        `CHECK(hcount == 1048, $sformatf("hsync falls at column %0d", hcount))
        if (last_hfall >= 0) `CHECK(cyc - last_hfall == 1344, $sformatf("line %0d clocks", cyc - last_hfall))
        last_hfall = cyc; hlow_start = cyc;
      end
      if (hsync && !ph) `CHECK(cyc - hlow_start == 136, $sformatf("hsync low %0d", cyc - hlow_start))
      if (!vsync && pv) begin
        `CHECK(vcount == 771 && hcount == 0, $sformatf("vsync falls at line %0d", vcount))
        if (last_vfall >= 0) `CHECK(cyc - last_vfall == 1344 * 806, $sformatf("frame %0d clocks", cyc - last_vfall))
        last_vfall = cyc; vlow_start = cyc; nv++;
      end
      if (vsync && !pv) `CHECK(cyc - vlow_start == 6 * 1344, $sformatf("vsync low %0d", cyc - vlow_start))
      ph = hsync; pv = vsync;
    end
    `TB_FINISH
  end
endmodule
