// distance_calc: distance of an object from the screen centre, in pixels.
// On start it latches sqrt((x-CTR_X)^2 + (y-CTR_Y)^2) computing the square root
// with isqrt_seq (one result bit per cycle); valid pulses when dist_px is
// updated, about 12 cycles after start. One pixel is one centimetre in this
// design, so dist_px is also the range in cm. The block is named in the
// document's user-interface diagram; the method is this design's.
module distance_calc #(
  parameter int unsigned CTR_X = 512,
  parameter int unsigned CTR_Y = 384
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [10:0] x,
  input  logic [9:0]  y,
  output logic [9:0]  dist_px,
  output logic        valid
);
  logic [10:0] dx;
  logic [9:0]  dy;
  logic [19:0] d2;
  logic [9:0]  root;
  logic        done;

  assign dx = (x >= 11'(CTR_X)) ? x - 11'(CTR_X) : 11'(CTR_X) - x;
  assign dy = (y >= 10'(CTR_Y)) ? y - 10'(CTR_Y) : 10'(CTR_Y) - y;

  always_ff @(posedge clk) begin
    if (rst) d2 <= '0;
    else if (start) d2 <= 20'(22'(dx) * 22'(dx) + 22'(dy) * 22'(dy) > 22'hFFFFF ?
                              22'hFFFFF : 22'(dx) * 22'(dx) + 22'(dy) * 22'(dy));
  end

  logic start_q;
  always_ff @(posedge clk) start_q <= rst ? 1'b0 : start;

  isqrt_seq #(.W(20)) u_sqrt (
    .clk, .rst, .start(start_q), .radicand(d2), .root, .done
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dist_px  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= done;
      if (done) dist_px <= root;
    end
  end
endmodule
