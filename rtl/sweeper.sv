// sweeper: rotating sweep "pie" of the sonar display.
// For the pixel (hcount, vcount) it finds the angle about the screen centre
// (CTR_X, CTR_Y): the first-quadrant angle a = atan(dy/dx) comes from atan_lut
// (lut_addr = dy*CTR_X + dx, one-cycle read), and is mapped to 0..359 degrees
// by quadrant (up-right a, up-left 180-a, down-left 180+a, down-right 360-a;
// angles grow counter-clockwise as on a compass rose drawn on screen).
// The pixel lies in the pie when its angle is within [lower, lower+PIE]
// (mod 360) and dx^2+dy^2 <= RSQ. Every STEP_CYCLES cycles both bounds
// advance by rspeed degrees, wrapping at 360, unless stop is high.
// Outputs (2 cycles after hcount/vcount): pixel = GREEN inside the pie,
// pie flag, and angle_loc = upper bound - angle (0 at the leading edge),
// used by alpha_blend for the fading trail.
// From the document: 30-degree pie, RSQ 116964 (342 px), 2^19-cycle step,
// bounds that grow and wrap at 360, the atan lookup. This design's choices:
// the quadrant fold and packing the lookup as dy*CTR_X + dx.
module sweeper
  import sonar_pkg::*;
#(
  parameter int unsigned PIE         = 30,
  parameter int unsigned RSQ         = 116964,
  parameter int unsigned STEP_CYCLES = 524288,
  parameter int unsigned CTR_X          = 512,
  parameter int unsigned CTR_Y          = 384
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [3:0]  rspeed,
  input  logic        stop,
  output logic [17:0] lut_addr,
  input  logic [6:0]  lut_angle,
  output rgb_t        pixel,
  output logic        pie,
  output logic [4:0]  angle_loc,
  output logic [8:0]  lower
);
  localparam int unsigned SCW = $clog2(STEP_CYCLES);

  logic [SCW-1:0] step_cnt;
  logic [8:0]     upper;
  logic [8:0]     lower_next;

  // ---- bound rotation ------------------------------------------------------
  always_comb begin
    lower_next = lower + 9'(rspeed);
    if (lower_next >= 9'd360) lower_next = lower_next - 9'd360;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      step_cnt <= '0;
      lower    <= '0;
    end else if (step_cnt == SCW'(STEP_CYCLES - 1)) begin
      step_cnt <= '0;
      if (!stop) lower <= lower_next;
    end else begin
      step_cnt <= step_cnt + 1'b1;
    end
  end

  always_comb begin
    upper = lower + 9'(PIE);
    if (upper >= 9'd360) upper = upper - 9'd360;
  end

  // ---- stage 1: fold into the first quadrant --------------------------------
  logic        right, top;
  logic [10:0] dx;
  logic [9:0]  dy;
  logic [9:0]  dxc;
  logic [8:0]  dyc;
  logic        right_q1, top_q1, near_q1;
  logic        right_q2, top_q2, near_q2;

  assign right = hcount >= 11'(CTR_X);
  assign top   = vcount < 10'(CTR_Y);
  assign dx    = right ? hcount - 11'(CTR_X) : 11'(CTR_X) - hcount;
  assign dy    = top ? 10'(CTR_Y) - vcount : vcount - 10'(CTR_Y);
  assign dxc   = (dx > 11'(CTR_X - 1)) ? 10'(CTR_X - 1) : dx[9:0];
  assign dyc   = (dy > 10'(CTR_Y - 1)) ? 9'(CTR_Y - 1) : dy[8:0];

  always_ff @(posedge clk) begin
    lut_addr <= 18'(dyc) * 18'(CTR_X) + 18'(dxc);
    right_q1 <= right;
    top_q1   <= top;
    near_q1  <= (22'(dx) * 22'(dx) + 22'(dy) * 22'(dy)) <= 22'(RSQ);
    // ---- stage 2: the table answer arrives
    right_q2 <= right_q1;
    top_q2   <= top_q1;
    near_q2  <= near_q1;
  end

  // ---- stage 2: full angle and pie test -------------------------------------
  logic [8:0] ang;
  logic [8:0] from_lower;
  logic [8:0] to_upper;

  always_comb begin
    unique case ({right_q2, top_q2})
      2'b11:   ang = 9'(lut_angle);
      2'b01:   ang = 9'd180 - 9'(lut_angle);
      2'b00:   ang = 9'd180 + 9'(lut_angle);
      default: ang = (lut_angle == 7'd0) ? 9'd0 : 9'd360 - 9'(lut_angle);
    endcase
    from_lower = (ang >= lower) ? ang - lower : ang + 9'd360 - lower;
    to_upper   = (upper >= ang) ? upper - ang : upper + 9'd360 - ang;
  end

  assign pie       = near_q2 && (from_lower <= 9'(PIE));
  // to_upper <= PIE inside the pie, so its low five bits carry it
  assign angle_loc = pie ? to_upper[4:0] : 5'd0;
  assign pixel     = pie ? GREEN : BLACK;
endmodule
