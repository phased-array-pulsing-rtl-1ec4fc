// cos2sin: sin(theta) = sqrt(1 - cos^2(theta)) in Q1.9 (512 = 1.0).
// Computed exactly in integers as sin = floor(sqrt(2^18 - cos^2)), so no
// rescaling is needed. Square one cycle, then a 10-step bit-serial square
// root. start (one cycle) -> ready pulse 12 cycles later with sin valid.
module cos2sin (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [9:0] cos_abs,
  output logic [9:0] sin,
  output logic       ready
);
  logic [19:0] sq, rad;
  logic        go;

  always_ff @(posedge clk) begin
    if (rst) begin
      sq <= '0;
      go <= 1'b0;
    end else begin
      sq <= 20'(cos_abs) * 20'(cos_abs);
      go <= start;
    end
  end

  assign rad = (sq >= 20'd262144) ? 20'd0 : 20'd262144 - sq;

  isqrt_seq #(.W(20)) u_sqrt (.clk(clk), .rst(rst), .start(go), .radicand(rad),
                              .root(sin), .done(ready));
endmodule
