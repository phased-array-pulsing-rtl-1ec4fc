// sonar_top: complete phased-array sonar, one 64.8 MHz clock.
// Data acquisition (data_acq) fires a 16-cycle 40 kHz burst 30 times a
// second, runs the twelve delta-sigma receiver channels through their
// filters and threshold detectors, and writes one 12-bit echo row per
// microsecond into the echo buffer (echo_bram). When the buffer is full
// (acq_done) signal processing (signal_analysis) scans it for wave packages,
// finds each object's range and bearing and converts them to screen
// coordinates; the display side (ui_top, timed by xvga_timing) draws the
// grid, the sweep, the objects and the menu and makes the sounds.
// Choosing calibration in the menu sets reprogram, so the next frame's
// range offset is learned from a person standing 300 cm in front.
// Interface: adc_in/adc_out are the comparator inputs and feedback outputs
// of the twelve converters; pulse_out = {out_p, out_m} drives the
// transmitter amplifier; mx, my and the clicks come from a mouse; pixel,
// hsync, vsync, blank go to the display (4 cycles after the timing
// generator); sound goes to a speaker. cal_* loads the bearing correction
// table and grid_* the grid bitmap. dist_ascii and speed_ascii are object 0's
// values for a character generator.
// Parameters default to the document's numbers; they only exist so that
// test benches can shorten the long periods.
module sonar_top
  import sonar_pkg::rgb_t, sonar_pkg::ui_mode_e, sonar_pkg::MODE_CALIBRATE;
#(
  parameter int unsigned NUM_CH       = 12,
  parameter int unsigned NUM_OBJ      = 10,
  parameter int unsigned AW           = 15,
  parameter int unsigned MHZ_DIV      = 64,
  parameter int unsigned FRAME_DIV    = 2_160_000,
  parameter int unsigned OBJ_STEP     = 4194304,
  parameter int unsigned SWEEP_STEP   = 524288,
  parameter int unsigned SIREN_HALF   = 60000,
  parameter int unsigned ALARM_HALF_A = 81000,
  parameter int unsigned ALARM_HALF_B = 46286,
  parameter int unsigned SPEED_SAMPLE = 21_600_000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tx_enable,
  input  logic [NUM_CH-1:0] adc_in,
  output logic [NUM_CH-1:0] adc_out,
  output logic [1:0]        pulse_out,
  input  logic [11:0]       mx,
  input  logic [11:0]       my,
  input  logic              left_click,
  input  logic              right_click,
  input  logic              cal_we,
  input  logic [7:0]        cal_waddr,
  input  logic signed [7:0] cal_wdata,
  input  logic              grid_we,
  input  logic [17:0]       grid_waddr,
  input  logic              grid_wdata,
  output rgb_t              pixel,
  output logic              hsync,
  output logic              vsync,
  output logic              blank,
  output logic              sound,
  output logic [2:0]        menu_mode,
  output logic [3:0]        total_obj,
  output logic              spu_done,
  output logic [7:0]        dist_ascii [3],
  output logic [7:0]        speed_ascii [3]
);
  // ---- acquisition -------------------------------------------------------------
  logic              mhz_tick, frame_tick, we, acq_done;
  logic [AW-1:0]     waddr, raddr;
  logic [NUM_CH-1:0] wdata, rdata;
  logic signed [20:0] threshold;

  data_acq #(.NUM_CH(NUM_CH), .MHZ_DIV(MHZ_DIV), .FRAME_DIV(FRAME_DIV), .AW(AW)) u_acq (
    .clk, .rst, .tx_enable, .adc_in, .adc_out, .pulse_out, .mhz_tick, .frame_tick,
    .waddr, .we, .wdata, .acq_done, .threshold
  );

  echo_bram #(.DW(NUM_CH), .AW(AW)) u_buf (
    .clk, .we, .waddr, .wdata, .raddr, .rdata
  );

  // ---- signal processing -----------------------------------------------------
  ui_mode_e           mode;
  logic [10:0]        obj_x [NUM_OBJ];
  logic [9:0]         obj_y [NUM_OBJ];
  logic [9:0]         r_last;
  logic signed [9:0]  cos_last, b_now;
  logic               spu_busy;

  signal_analysis #(.NUM_CH(NUM_CH), .AW(AW), .NUM_OBJ(NUM_OBJ)) u_spu (
    .clk, .rst, .start(acq_done), .reprogram(mode == MODE_CALIBRATE),
    .raddr, .rdata, .x(obj_x), .y(obj_y), .total_obj, .r_last, .cos_last, .b_now,
    .busy(spu_busy), .done(spu_done), .cal_we, .cal_waddr, .cal_wdata
  );

  // ---- display -----------------------------------------------------------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs_raw, vs_raw, blank_raw;
  logic        warn_any, sound_on;
  logic [8:0]  sweep_angle;

  xvga_timing u_vga (
    .clk, .rst, .hcount, .vcount, .hsync(hs_raw), .vsync(vs_raw), .blank(blank_raw)
  );

  ui_top #(
    .NUM_OBJ(NUM_OBJ), .OBJ_STEP(OBJ_STEP), .SWEEP_STEP(SWEEP_STEP),
    .SIREN_HALF(SIREN_HALF), .ALARM_HALF_A(ALARM_HALF_A), .ALARM_HALF_B(ALARM_HALF_B),
    .SPEED_SAMPLE(SPEED_SAMPLE)
  ) u_ui (
    .clk, .rst, .hcount, .vcount, .hsync(hs_raw), .vsync(vs_raw), .blank(blank_raw),
    .obj_x, .obj_y, .num_obj(total_obj), .mx, .my, .left_click, .right_click,
    .grid_we, .grid_waddr, .grid_wdata, .pixel, .hsync_o(hsync), .vsync_o(vsync),
    .blank_o(blank), .sound_output(sound), .mode, .warn_any, .sound_on, .sweep_angle,
    .dist_ascii, .speed_ascii
  );

  assign menu_mode = 3'(mode);
endmodule
