// ui_top: the display and sound half of the sonar.
// Inputs are the display timing (hcount, vcount, syncs, blank), the object
// coordinates from signal processing (slots 0..num_obj-1 are valid) and the
// mouse. It draws, per pixel:
//   grid (sonar_grid)  blended with the rotating sweep (sweeper + atan_lut,
//   alpha_blend), objects as pulsating discs (object_rep x NUM_OBJ) on top,
//   and the mode menu (gui_menu) on top of everything.
// Modes from the menu: normal shows all; calibration shows the grid and the
// menu only; hide-menu drops the menu; hide-all drops the menu and would
// drop all text. Sound: when any shown object is within 110 px the two-tone
// alarm plays; otherwise a short siren tone starts when the sweep covers an
// object pixel. Object 0's distance from the centre and its speed are
// converted to ASCII for an external character generator.
// Timing: pixel, hsync_o, vsync_o and blank_o are 4 cycles after hcount,
// vcount, hsync, vsync, blank (2 for the sources, 1 for the blend, 1 for
// the final choice); the syncs are delayed to match.
// Structure and behaviour follow the document's user-interface section; the
// mode-to-layer mapping and which object feeds the text are this design's.
module ui_top
  import sonar_pkg::rgb_t, sonar_pkg::ui_mode_e, sonar_pkg::BLACK, sonar_pkg::MODE_NORMAL, sonar_pkg::MODE_CALIBRATE;
#(
  parameter int unsigned NUM_OBJ      = 10,
  parameter int unsigned OBJ_STEP     = 4194304,
  parameter int unsigned SWEEP_STEP   = 524288,
  parameter int unsigned RSPEED       = 1,
  parameter int unsigned SIREN_HALF   = 60000,
  parameter int unsigned ALARM_HALF_A = 81000,
  parameter int unsigned ALARM_HALF_B = 46286,
  parameter int unsigned SPEED_SAMPLE = 21_600_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        hsync,
  input  logic        vsync,
  input  logic        blank,
  input  logic [10:0] obj_x [NUM_OBJ],
  input  logic [9:0]  obj_y [NUM_OBJ],
  input  logic [3:0]  num_obj,
  input  logic [11:0] mx,
  input  logic [11:0] my,
  input  logic        left_click,
  input  logic        right_click,
  input  logic        grid_we,
  input  logic [17:0] grid_waddr,
  input  logic        grid_wdata,
  output rgb_t        pixel,
  output logic        hsync_o,
  output logic        vsync_o,
  output logic        blank_o,
  output logic        sound_output,
  output ui_mode_e    mode,
  output logic        warn_any,
  output logic        sound_on,
  output logic [8:0]  sweep_angle,
  output logic [7:0]  dist_ascii [3],
  output logic [7:0]  speed_ascii [3]
);
  localparam int unsigned LAT = 4;

  logic show_objects, show_sweep, show_menu;
  assign show_objects = (mode != MODE_CALIBRATE);
  assign show_sweep   = (mode != MODE_CALIBRATE);
  assign show_menu    = (mode == MODE_NORMAL) || (mode == MODE_CALIBRATE);

  // ---- background grid -------------------------------------------------------
  rgb_t grid_px;
  sonar_grid u_grid (
    .clk, .hcount, .vcount, .pixel(grid_px),
    .we(grid_we), .waddr(grid_waddr), .wdata(grid_wdata)
  );

  // ---- sweep -----------------------------------------------------------------
  logic [17:0] lut_addr;
  logic [6:0]  lut_angle;
  rgb_t        sweep_px;
  logic        pie;
  logic [4:0]  angle_loc;

  atan_lut u_atan (.clk, .addr(lut_addr), .angle(lut_angle));

  sweeper #(.STEP_CYCLES(SWEEP_STEP)) u_sweep (
    .clk, .rst, .hcount, .vcount, .rspeed(4'(RSPEED)), .stop(1'b0),
    .lut_addr, .lut_angle, .pixel(sweep_px), .pie, .angle_loc, .lower(sweep_angle)
  );

  rgb_t blended;
  alpha_blend u_blend (
    .clk, .grid(grid_px), .sweep(sweep_px), .pie(pie && show_sweep),
    .loc(angle_loc), .pixel(blended)
  );

  // ---- objects ---------------------------------------------------------------
  rgb_t              obj_px [NUM_OBJ];
  logic [NUM_OBJ-1:0] obj_warn;
  rgb_t              obj_any;

  for (genvar k = 0; k < NUM_OBJ; k++) begin : g_obj
    object_rep #(.STEP_CYCLES(OBJ_STEP)) u_obj (
      .clk, .rst, .hcount, .vcount, .x(obj_x[k]), .y(obj_y[k]),
      .on(show_objects && (4'(k) < num_obj)), .pixel(obj_px[k]), .warn(obj_warn[k])
    );
  end

  always_comb begin
    obj_any = BLACK;
    for (int k = 0; k < NUM_OBJ; k++)
      if (obj_px[k] != BLACK) obj_any = obj_px[k];
  end

  // ---- menu ------------------------------------------------------------------
  rgb_t menu_px;
  gui_menu u_menu (
    .clk, .rst, .hcount, .vcount, .mx, .my, .left_click, .right_click,
    .show(show_menu), .mode, .pixel(menu_px)
  );

  // ---- compose: stage 3 lines up with the blend output ------------------------
  rgb_t obj_q, menu_q;
  logic [LAT-1:0] hs_d, vs_d, bl_d;

  always_ff @(posedge clk) begin
    obj_q  <= obj_any;
    menu_q <= menu_px;
    hs_d   <= {hs_d[LAT-2:0], hsync};
    vs_d   <= {vs_d[LAT-2:0], vsync};
    bl_d   <= {bl_d[LAT-2:0], blank};
    if (bl_d[LAT-2])           pixel <= BLACK;
    else if (menu_q != BLACK)  pixel <= menu_q;
    else if (obj_q != BLACK)   pixel <= obj_q;
    else                       pixel <= blended;
  end

  assign hsync_o = hs_d[LAT-1];
  assign vsync_o = vs_d[LAT-1];
  assign blank_o = bl_d[LAT-1];

  // ---- sound -----------------------------------------------------------------
  logic siren, alarm;

  assign sound_on = (obj_any != BLACK) && (sweep_px != BLACK) && show_sweep;
  assign warn_any = |obj_warn;

  siren_gen #(.HALF_PERIOD(SIREN_HALF)) u_siren (
    .clk, .rst, .sound_on, .audio(siren)
  );
  alarm_gen #(.HALF_A(ALARM_HALF_A), .HALF_B(ALARM_HALF_B)) u_alarm (
    .clk, .rst, .alarm_on(warn_any), .audio(alarm)
  );
  assign sound_output = warn_any ? alarm : siren;

  // ---- text values for object 0 -----------------------------------------------
  logic [9:0] dist0, speed0;
  logic       dist_valid, dist_valid2, speed_valid;

  distance_calc u_dist (
    .clk, .rst, .start(hcount == 11'd0 && vcount == 10'd0),
    .x(obj_x[0]), .y(obj_y[0]), .dist_px(dist0), .valid(dist_valid)
  );
  speed_est #(.SAMPLE_CYCLES(SPEED_SAMPLE)) u_speed (
    .clk, .rst, .dist_px(dist0), .speed(speed0)
  );
  bin2ascii u_dist_txt  (.clk, .rst, .value(dist0),  .ascii(dist_ascii),  .valid(dist_valid2));
  bin2ascii u_speed_txt (.clk, .rst, .value(speed0), .ascii(speed_ascii), .valid(speed_valid));
endmodule
