// alpha_blend: mixes the sweeper colour into the grid colour.
// Inside the pie the sweep colour gets the weight (PIE - loc)/PIE and the
// grid colour loc/PIE, per 8-bit channel, so the sweep is solid at its
// leading edge (loc = 0) and fades to the grid across the pie. Outside the
// pie the grid passes unchanged. The division by PIE is a multiply by
// round(2^16/PIE) and a 16-bit shift. Output registered: 1 cycle latency.
// The document asks for an incremental alpha-blend across the sweep; the
// weights and the reciprocal multiply are this design's.
module alpha_blend
  import sonar_pkg::*;
#(
  parameter int unsigned PIE = 30
) (
  input  logic       clk,
  input  rgb_t       grid,
  input  rgb_t       sweep,
  input  logic       pie,
  input  logic [4:0] loc,
  output rgb_t       pixel
);
  localparam int unsigned RECIP = (65536 + PIE / 2) / PIE;

  logic [4:0] ws, wg;
  rgb_t       mixed;

  assign wg = (loc > 5'(PIE)) ? 5'(PIE) : loc;
  assign ws = 5'(PIE) - wg;

  always_comb begin
    for (int c = 0; c < 3; c++) begin
      logic [12:0] acc;
      logic [29:0] scaled; // low 16 bits are the fraction
      acc    = 13'(sweep[c*8 +: 8]) * 13'(ws) + 13'(grid[c*8 +: 8]) * 13'(wg);
      scaled = 30'(acc) * 30'(RECIP);
      mixed[c*8 +: 8] = (scaled[29:16] > 14'd255) ? 8'd255 : scaled[23:16];
    end
  end

  always_ff @(posedge clk)
    pixel <= pie ? mixed : grid;
endmodule
