// tri_fir: eighth-order FIR low-pass with the triangular coefficient set
// 1,3,5,7,7,5,3,1 (DC gain 32).
// Transposed form: the input is multiplied by each coefficient with shifts
// and adds, and added into a chain of 21-bit partial-sum registers, so the
// output y[n] = sum c[k] x[n-k] appears one enable after x[n] arrives.
// The full 21-bit result is output; callers divide by 32 where they need the
// input scale. Clock-enabled, used at 65 MHz and at the 1 MHz sample rate.
module tri_fir (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic signed [15:0] din,
  output logic signed [20:0] dout
);
  logic signed [20:0] x1, x3, x5, x7;
  logic signed [20:0] acc [8];

  assign x1 = 21'(din);
  assign x3 = (x1 <<< 1) + x1;
  assign x5 = (x1 <<< 2) + x1;
  assign x7 = (x1 <<< 3) - x1;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) acc[i] <= '0;
    end else if (en) begin
      acc[0] <= x1;
      acc[1] <= acc[0] + x3;
      acc[2] <= acc[1] + x5;
      acc[3] <= acc[2] + x7;
      acc[4] <= acc[3] + x7;
      acc[5] <= acc[4] + x5;
      acc[6] <= acc[5] + x3;
      acc[7] <= acc[6] + x1;
    end
  end

  assign dout = acc[7];
endmodule
