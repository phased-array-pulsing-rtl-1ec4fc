// atan_lut: inverse-tangent table for the sweeper.
// For every point (dx, dy) of the first quadrant, 0 <= dx < W and
// 0 <= dy < H (offsets from the screen centre), it stores the angle
// round(atan2(dy, dx)) in whole degrees, 0..90, at address dy*W + dx.
// The table is computed when the design is elaborated, from that formula.
// Synchronous read: angle is valid one cycle after addr.
module atan_lut #(
  parameter int unsigned W = 512,
  parameter int unsigned H = 384
) (
  input  logic        clk,
  input  logic [17:0] addr,
  output logic [6:0]  angle
);
  logic [6:0] rom [W*H];

  initial begin
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++)
        rom[yy*W + xx] = 7'($rtoi($atan2(real'(yy), real'(xx)) * 180.0 / 3.14159265358979 + 0.5));
  end

  always_ff @(posedge clk)
    angle <= rom[addr];
endmodule
