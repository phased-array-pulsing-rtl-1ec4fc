// polar2cart: coordinate generator and buffer.
// Converts the current object's range r (cm) and cos(theta) (Q1.9) into
// screen coordinates with the sonar at the centre of the 1024x768 screen and
// one pixel per centimetre:
//   x = HX + (r * cos) >>> 9,   y = HY - (r * sin) >> 9,
// sin from cos2sin. Both are saturated to the screen. The result is written
// into entry obj_num of a NUM_OBJ-entry buffer, which holds the coordinates
// shown until the entry is rewritten.
// Handshake: start (one cycle) -> done pulse about 16 cycles later.
module polar2cart #(
  parameter int unsigned NUM_OBJ = 10,
  parameter int unsigned HX      = 512,
  parameter int unsigned HY      = 384
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [9:0]        r,
  input  logic signed [9:0] cos_theta,
  input  logic [3:0]        obj_num,
  output logic [10:0]       x [NUM_OBJ],
  output logic [9:0]        y [NUM_OBJ],
  output logic              done
);
  logic [9:0]  cos_abs, sin;
  logic        sin_ready, busy;
  logic signed [20:0] rx;
  logic [19:0] ry;
  logic signed [12:0] xs, ys;

  assign cos_abs = cos_theta[9] ? 10'(-cos_theta) : 10'(cos_theta);

  cos2sin u_c2s (.clk(clk), .rst(rst), .start(start), .cos_abs(cos_abs), .sin(sin), .ready(sin_ready));

  assign rx = $signed({11'b0, r}) * 21'(cos_theta);
  assign ry = 20'(r) * 20'(sin);
  assign xs = 13'(HX) + 13'(rx >>> 9);
  assign ys = 13'(HY) - $signed({1'b0, 12'(ry >> 9)});

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      for (int i = 0; i < NUM_OBJ; i++) begin
        x[i] <= '0;
        y[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) busy <= 1'b1;
      else if (busy && sin_ready) begin
        if (32'(obj_num) < NUM_OBJ) begin
          x[obj_num] <= (xs < 0) ? 11'd0 : (xs > 13'sd1023) ? 11'd1023 : 11'(xs);
          y[obj_num] <= (ys < 0) ? 10'd0 : (ys > 13'sd767)  ? 10'd767  : 10'(ys);
        end
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
