// tb_ui_top: the display and sound side driven by xvga_timing, with the
// long periods shortened (sweep step 65536 clocks, so the pie stays on a point for about two frames, pulsation step 64, siren
// half period 100, alarm 50/30, speed sample 1000). Checks, following each
// pixel's coordinates through the 4-clock pipeline:
//  - hsync_o/vsync_o/blank_o are the inputs delayed by 4 clocks; blank
//    pixels are black;
//  - a loaded grid pixel shows in the grid colour where nothing covers it;
//  - object 0 at (700,384) is drawn yellow at its centre, over the grid;
//  - the sweep passing over the object starts the siren (sound_on seen,
//    sound toggles) while no object is near;
//  - object 1 at (550,410) is within 110 px: warn_any and the alarm tone;
//  - menu: left click on item 1 gives calibration mode, objects vanish and
//    the menu frame stays; item 3 hides the menu; right click returns;
//  - object 0's distance 188 appears as "188".
module tb_ui_top;
  `include "tb_util.svh"
  import sonar_pkg::*;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  logic [10:0] obj_x [10];
  logic [9:0] obj_y [10];
  logic [3:0] num_obj = 0;
  logic [11:0] mx = 0, my = 0;
  logic left_click = 0, right_click = 0, grid_we = 0, grid_wdata = 0;
  logic [17:0] grid_waddr = 0;
  rgb_t pixel;
  logic hsync_o, vsync_o, blank_o, sound_output, warn_any, sound_on;
  ui_mode_e mode;
  logic [8:0] sweep_angle;
  logic [7:0] dist_ascii [3], speed_ascii [3];
  always #5 clk = ~clk;

  xvga_timing u_vga (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);
  ui_top #(.OBJ_STEP(64), .SWEEP_STEP(65536), .SIREN_HALF(100), .ALARM_HALF_A(50),
           .ALARM_HALF_B(30), .SPEED_SAMPLE(1000)) dut (
    .clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .obj_x, .obj_y, .num_obj,
    .mx, .my, .left_click, .right_click, .grid_we, .grid_waddr, .grid_wdata, .pixel,
    .hsync_o, .vsync_o, .blank_o, .sound_output, .mode, .warn_any, .sound_on, .sweep_angle,
    .dist_ascii, .speed_ascii);

  initial begin #2_000_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  // coordinates and syncs four clocks back
  logic [10:0] hd [4];
  logic [9:0]  vd [4];
  logic [3:0]  hs_d, vs_d, bl_d;
  always @(posedge clk) begin
    for (int i = 3; i > 0; i--) begin hd[i] <= hd[i-1]; vd[i] <= vd[i-1]; end
    hd[0] <= hcount; vd[0] <= vcount;
    hs_d <= {hs_d[2:0], hsync}; vs_d <= {vs_d[2:0], vsync}; bl_d <= {bl_d[2:0], blank};
  end

  // per-frame observations
  rgb_t at_obj0, at_grid, at_frame;
  int   sync_bad = 0, blank_bad = 0;
  always @(negedge clk) if (!rst) begin
    if (hsync_o != hs_d[3] || vsync_o != vs_d[3] || blank_o != bl_d[3]) sync_bad++;
    if (blank_o && pixel != BLACK) blank_bad++;
    if (hd[3] == 700 && vd[3] == 384) at_obj0 = pixel;
    if (hd[3] == 100 && vd[3] == 100) at_grid = pixel;
    if (hd[3] == 920 && vd[3] == 300) at_frame = pixel;
  end

  int sound_on_seen = 0, sound_edges = 0;
  logic prev_sound = 0;
  always @(posedge clk) begin
    if (sound_on) sound_on_seen++;
    if (sound_output != prev_sound) sound_edges++;
    prev_sound = sound_output;
  end

  task automatic frames(int n);
    repeat (n) begin
      @(negedge vsync);
    end
  endtask

  task automatic click(int x, int y, logic left);
    @(negedge clk); mx = 12'(x); my = 12'(y);
    if (left) left_click = 1; else right_click = 1;
    @(negedge clk); left_click = 0; right_click = 0;
  endtask

  initial begin
    foreach (obj_x[i]) begin obj_x[i] = 0; obj_y[i] = 0; end
    // one grid dot at (100,100) in the quadrant bitmap
    repeat (2) @(posedge clk);
    @(negedge clk); grid_we = 1; grid_waddr = 18'(100 * 512 + 100); grid_wdata = 1;
    @(negedge clk); grid_we = 0;
    rst <= 0;
    obj_x[0] = 700; obj_y[0] = 384; num_obj = 1;
    frames(2);
    `CHECK(sync_bad == 0 && blank_bad == 0, $sformatf("sync delay errors %0d, lit blank pixels %0d", sync_bad, blank_bad))
    `CHECK(at_obj0 == YELLOW, $sformatf("object 0 pixel %h", at_obj0))
    `CHECK(at_grid == 24'h2E8B57 || sweep_angle inside {[100:190]}, $sformatf("grid pixel %h", at_grid))
    `CHECK(at_frame == 24'hFFFFFF, "menu frame drawn in normal mode")
    `CHECK(dist_ascii[0] == "1" && dist_ascii[1] == "8" && dist_ascii[2] == "8",
           $sformatf("distance text %s%s%s", dist_ascii[0], dist_ascii[1], dist_ascii[2]))
    // a full sweep revolution: 360 steps of 65536 clocks
    sound_on_seen = 0; sound_edges = 0;
    repeat (370 * 65536) @(posedge clk);
    `CHECK(!warn_any, "no warning for a far object")
    `CHECK(sound_on_seen > 0, "sweep met the object")
    `CHECK(sound_edges > 10, $sformatf("siren edges %0d", sound_edges))
    // near object: alarm
    obj_x[1] = 550; obj_y[1] = 410; num_obj = 2;
    frames(1);
    `CHECK(warn_any, "near object warns")
    sound_edges = 0;
    repeat (5000) @(posedge clk);
    `CHECK(sound_edges >= 5000 / 50 - 2, $sformatf("alarm edges %0d", sound_edges))
    // menu: calibration mode
    click(950, 280, 1);
    `CHECK(mode == MODE_CALIBRATE, "calibration selected")
    frames(2);
    `CHECK(at_obj0 != YELLOW, "objects hidden in calibration mode")
    `CHECK(!warn_any, "no warning while objects are hidden")
    `CHECK(at_frame == 24'hFFFFFF, "menu shown in calibration mode")
    click(950, 480, 1);
    `CHECK(mode == MODE_HIDE_ALL, "hide-all selected")
    frames(2);
    `CHECK(at_frame != 24'hFFFFFF && at_obj0 == YELLOW, "menu hidden, objects back")
    click(10, 10, 0);
    `CHECK(mode == MODE_NORMAL, "right click returns to normal")
    `TB_FINISH
  end
endmodule
