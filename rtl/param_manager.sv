// param_manager: holds the distance calibration r = a*t/2^14 + b.
// a (cm per 2^14 samples) is fixed in hardware at A_DEFAULT; b (cm, two's
// complement) starts at B_DEFAULT and is replaced by the distance
// retriever's calibration result whenever cal_valid pulses.
module param_manager #(
  parameter int unsigned A_DEFAULT = 285,
  parameter int          B_DEFAULT = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cal_valid,
  input  logic signed [9:0] b_cal,
  output logic [9:0]        a,
  output logic signed [9:0] b
);
  assign a = 10'(A_DEFAULT);

  always_ff @(posedge clk) begin
    if (rst)            b <= 10'(B_DEFAULT);
    else if (cal_valid) b <= b_cal;
  end
endmodule
