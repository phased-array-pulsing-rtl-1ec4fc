// tb_alpha_blend: random grid and sweep colours and positions in the pie.
// Inside the pie each channel must be (sweep*(30-loc) + grid*loc) * 2185
// >> 16 (2185 = round(2^16/30)); outside the pie the grid passes. One
// clock latency.
module tb_alpha_blend;
  `include "tb_util.svh"
  logic clk = 0, pie = 0;
  logic [23:0] grid = 0, sweep = 0, pixel, e;
  logic [4:0] loc = 0;
  always #5 clk = ~clk;
  alpha_blend dut (.clk, .grid, .sweep, .pie, .loc, .pixel);

  initial begin #5_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int v;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      grid = 24'($urandom); sweep = 24'($urandom); pie = 1'($urandom); loc = 5'($urandom_range(0, 30));
      for (int c = 0; c < 3; c++) begin
        v = ((sweep[c*8 +: 8] * (30 - loc) + grid[c*8 +: 8] * loc) * 2185) >> 16;
        e[c*8 +: 8] = v > 255 ? 8'd255 : 8'(v);
      end
      if (!pie) e = grid;
      @(negedge clk);
      `CHECK(pixel == e, $sformatf("pixel %h expected %h (loc %0d pie %b)", pixel, e, loc, pie))
    end
    // full-weight ends
    @(negedge clk); grid = 24'h102030; sweep = 24'h00FF00; pie = 1; loc = 0;
    @(negedge clk); `CHECK(pixel == 24'h00FE00 || pixel == 24'h00FF00, $sformatf("leading edge %h", pixel))
    `TB_FINISH
  end
endmodule
