// sonar_grid: background grid of the sonar display.
// The grid is symmetric about both screen axes, so only the top-left
// quadrant (HX x HY one-bit pixels) is stored; the other quadrants are
// folded onto it: x' = 2*HX-1-x on the right half, y' = 2*HY-1-y on the
// bottom half, address = y'*HX + x'. A set bit is drawn in COLOR, a clear
// bit black. Latency 2 cycles: address register, then memory read.
// The bitmap contents are not part of this design; they are loaded through
// the write port (address = y*HX + x of the top-left quadrant).
module sonar_grid
  import sonar_pkg::*;
#(
  parameter int unsigned HX    = 512,
  parameter int unsigned HY    = 384,
  parameter rgb_t        COLOR = 24'h2E8B57
) (
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output rgb_t        pixel,
  input  logic        we,
  input  logic [17:0] waddr,
  input  logic        wdata
);
  logic bitmap [HX*HY];
  logic [17:0] addr;
  logic [10:0] xf;
  logic [9:0]  yf;
  logic        on, in_area;
  logic        inside_q;

  assign xf = (hcount < 11'(HX)) ? hcount : 11'(2*HX - 1) - hcount;
  assign yf = (vcount < 10'(HY)) ? vcount : 10'(2*HY - 1) - vcount;
  assign in_area = (hcount < 11'(2*HX)) && (vcount < 10'(2*HY));

  always_ff @(posedge clk) begin
    addr     <= 18'(yf) * 18'(HX) + 18'(xf);
    inside_q <= in_area;
    on       <= inside_q && bitmap[addr];
    if (we) bitmap[waddr] <= wdata;
  end

  assign pixel = on ? COLOR : BLACK;
endmodule
