// signal_analysis: the signal processing unit.
// Reads the echo buffer of one frame and produces up to NUM_OBJ object
// positions. For each wave package found by the 12-channel detector (wpd12)
// the controller runs, in order: distance_retriever (range from the mean
// leading edge of channels 4..7, calibrated by param_manager),
// phase_retriever (unwrapped arrival-time difference between channels 11 and
// 0), angle_retriever (cos theta, with calibration table) and polar2cart
// (screen x, y into the object buffer). 'start' is the end of acquisition;
// 'done' pulses when the frame is analysed, with total_obj objects in x/y.
// With reprogram high each object recalibrates the range offset b so that it
// reads 300 cm (the calibration mode of the user interface).
module signal_analysis #(
  parameter int unsigned NUM_CH  = 12,
  parameter int unsigned AW      = 15,
  parameter int unsigned NUM_OBJ = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              reprogram,
  output logic [AW-1:0]     raddr,
  input  logic [NUM_CH-1:0] rdata,
  output logic [10:0]       x [NUM_OBJ],
  output logic [9:0]        y [NUM_OBJ],
  output logic [3:0]        total_obj,
  output logic [9:0]        r_last,
  output logic signed [9:0] cos_last,
  output logic signed [9:0] b_now,
  output logic              busy,
  output logic              done,
  input  logic              cal_we,
  input  logic [7:0]        cal_waddr,
  input  logic signed [7:0] cal_wdata
);
  logic restart_wpd, start_wpd, start_dr, start_br, start_ar, start_cr, sel_br;
  logic done_wpd, finished_wpd, done_dr, done_br, done_ar, done_cr;
  logic [3:0] obj_num;
  logic [AW-1:0] raddr_wpd, raddr_br;
  logic [15:0] t1 [NUM_CH];
  logic [15:0] t2 [NUM_CH];
  logic [15:0] t1_mid [4];
  logic [9:0]  a, r;
  logic signed [9:0] b, b_cal, cos_theta;
  logic cal_valid;
  logic signed [11:0] dt;

  spu_controller #(.NUM_OBJ(NUM_OBJ)) u_ctrl (
    .clk(clk), .rst(rst), .start(start),
    .done_wpd(done_wpd), .finished_wpd(finished_wpd), .done_dr(done_dr), .done_br(done_br),
    .done_ar(done_ar), .done_cr(done_cr),
    .restart_wpd(restart_wpd), .start_wpd(start_wpd), .start_dr(start_dr), .start_br(start_br),
    .start_ar(start_ar), .start_cr(start_cr), .sel_br(sel_br),
    .obj_num(obj_num), .total_obj(total_obj), .done(done), .busy(busy));

  assign raddr = sel_br ? raddr_br : raddr_wpd;

  wpd12 #(.NUM_CH(NUM_CH), .AW(AW)) u_wpd12 (
    .clk(clk), .rst(rst), .restart(restart_wpd), .start(start_wpd),
    .raddr(raddr_wpd), .rdata(rdata), .t1(t1), .t2(t2),
    .done(done_wpd), .finished(finished_wpd));

  for (genvar k = 0; k < 4; k++) begin : g_mid
    assign t1_mid[k] = t1[NUM_CH/2 - 2 + k];
  end

  param_manager u_pm (.clk(clk), .rst(rst), .cal_valid(cal_valid), .b_cal(b_cal), .a(a), .b(b));

  distance_retriever u_dr (
    .clk(clk), .rst(rst), .start(start_dr), .reprogram(reprogram), .t1_mid(t1_mid),
    .a(a), .b(b), .r(r), .b_cal(b_cal), .cal_valid(cal_valid), .done(done_dr));

  phase_retriever #(.NUM_CH(NUM_CH), .AW(AW)) u_br (
    .clk(clk), .rst(rst), .start(start_br),
    .t1_0(t1[0]), .t2_0(t2[0]), .t1_11(t1[NUM_CH-1]), .t2_11(t2[NUM_CH-1]),
    .raddr(raddr_br), .rdata(rdata), .dt(dt), .done(done_br));

  angle_retriever u_ar (
    .clk(clk), .rst(rst), .start(start_ar), .dt(dt), .r(r), .cos_theta(cos_theta), .done(done_ar),
    .cal_we(cal_we), .cal_waddr(cal_waddr), .cal_wdata(cal_wdata));

  polar2cart #(.NUM_OBJ(NUM_OBJ)) u_p2c (
    .clk(clk), .rst(rst), .start(start_cr), .r(r), .cos_theta(cos_theta), .obj_num(obj_num),
    .x(x), .y(y), .done(done_cr));

  assign r_last   = r;
  assign cos_last = cos_theta;
  assign b_now    = b;
endmodule
