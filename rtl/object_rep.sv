// object_rep: draws one detected object as a pulsating disc.
// A pixel (hcount, vcount) is lit when (hcount-x)^2 + (vcount-y)^2 <=
// rsquared and the object is present (on). The colour depends on the
// object's squared distance from the screen centre (CTR_X, CTR_Y): red when it is
// <= WARN_DIST2 (110 px), yellow when <= NEAR_DIST2 (220 px), green beyond;
// warn is high while a present object is within WARN_DIST2.
// Pulsation: every STEP_CYCLES cycles a six-state machine updates rsquared:
// 0 grow by 2 until >= RMAX-DELTA, 1 grow by 1 until >= RMAX, 2 hold one
// step, 3 shrink by 1 until <= RMAX-DELTA, 4 shrink by 2 until <= RMIN,
// 5 hold one step, then back to 0.
// Timing: pixel is valid 2 cycles after hcount/vcount (register the squared
// offsets, then compare); warn follows x, y by 2 cycles.
// All numbers and the state machine follow the document; it is written
// here for the 10 object slots of this design.
module object_rep
  import sonar_pkg::*;
#(
  parameter int unsigned RMIN        = 16,
  parameter int unsigned RMAX        = 49,
  parameter int unsigned DELTA       = 8,
  parameter int unsigned STEP_CYCLES = 4194304,
  parameter int unsigned WARN_DIST2  = 12100,
  parameter int unsigned NEAR_DIST2  = 48400,
  parameter int unsigned CTR_X          = 512,
  parameter int unsigned CTR_Y          = 384
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [10:0] x,
  input  logic [9:0]  y,
  input  logic        on,
  output rgb_t        pixel,
  output logic        warn
);
  localparam int unsigned SCW = $clog2(STEP_CYCLES);

  typedef enum logic [2:0] {
    GROW_FAST, GROW_SLOW, HOLD_BIG, SHRINK_SLOW, SHRINK_FAST, HOLD_SMALL
  } pulse_e;

  pulse_e         state;
  logic [SCW-1:0] step_cnt;
  logic [6:0]     rsquared;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= GROW_FAST;
      step_cnt <= '0;
      rsquared <= 7'(RMIN);
    end else if (step_cnt == SCW'(STEP_CYCLES - 1)) begin
      step_cnt <= '0;
      unique case (state)
        GROW_FAST:   if (rsquared < 7'(RMAX - DELTA)) rsquared <= rsquared + 7'd2;
                     else state <= GROW_SLOW;
        GROW_SLOW:   if (rsquared < 7'(RMAX)) rsquared <= rsquared + 7'd1;
                     else state <= HOLD_BIG;
        HOLD_BIG:    state <= SHRINK_SLOW;
        SHRINK_SLOW: if (rsquared > 7'(RMAX - DELTA)) rsquared <= rsquared - 7'd1;
                     else state <= SHRINK_FAST;
        SHRINK_FAST: if (rsquared > 7'(RMIN)) rsquared <= rsquared - 7'd2;
                     else state <= HOLD_SMALL;
        default:     state <= GROW_FAST;
      endcase
    end else begin
      step_cnt <= step_cnt + 1'b1;
    end
  end

  // ---- distance of the object from the centre --------------------------------
  logic [10:0] ox;
  logic [9:0]  oy;
  logic [21:0] center_d2;
  logic        near_q, warn_q;

  assign ox = (x >= 11'(CTR_X)) ? x - 11'(CTR_X) : 11'(CTR_X) - x;
  assign oy = (y >= 10'(CTR_Y)) ? y - 10'(CTR_Y) : 10'(CTR_Y) - y;

  always_ff @(posedge clk) begin
    center_d2 <= 22'(ox) * 22'(ox) + 22'(oy) * 22'(oy);
    warn_q    <= on && (center_d2 <= 22'(WARN_DIST2));
    near_q    <= center_d2 <= 22'(NEAR_DIST2);
  end
  assign warn = warn_q;

  // ---- disc test, two stages -------------------------------------------------
  logic signed [11:0] px;
  logic signed [10:0] py;
  logic [23:0]        pd2;
  logic               lit;

  assign px = signed'({1'b0, hcount}) - signed'({1'b0, x});
  assign py = signed'({1'b0, vcount}) - signed'({1'b0, y});

  always_ff @(posedge clk) begin
    pd2 <= 24'(px) * 24'(px) + 24'(py) * 24'(py);
    lit <= on && (pd2 <= 24'(rsquared));
  end

  assign pixel = !lit ? BLACK : warn_q ? RED : near_q ? YELLOW : GREEN;
endmodule
