// cal_lut: calibration table for the angle estimate.
// The far-field formula is off for near objects, so a measured correction is
// added: cos_out = sat(cos_in + table[{cos_in[8:5], r[6:3]}]), i.e. a 16x16
// grid over coarse cos(theta) and coarse range. The table holds signed 8-bit
// corrections in Q1.9 units. The measured values are not part of this design:
// the table starts at zero (no correction) and is loaded through the write
// port. Output is registered: one cycle from cos_in/r to cos_out.
module cal_lut #(
  parameter int unsigned DEPTH = 256
) (
  input  logic              clk,
  input  logic signed [9:0] cos_in,
  input  logic [9:0]        r,
  output logic signed [9:0] cos_out,
  input  logic              we,
  input  logic [7:0]        waddr,
  input  logic signed [7:0] wdata
);
  logic signed [7:0] table_mem [DEPTH];
  logic [7:0] idx;
  logic signed [10:0] sum;

  initial for (int i = 0; i < DEPTH; i++) table_mem[i] = '0;

  assign idx = {cos_in[8:5], r[6:3]};
  assign sum = 11'(cos_in) + 11'(table_mem[idx]);

  always_ff @(posedge clk) begin
    if (we) table_mem[waddr] <= wdata;
    cos_out <= (sum > 11'sd511) ? 10'sd511 : (sum < -11'sd511) ? -10'sd511 : 10'(sum);
  end
endmodule
