// tb_sonar_top: end-to-end run of the whole sonar with twelve behavioural
// receiver front ends (echo_source). Acquisition and processing run at the
// document's rates (30 Hz frames, 1 MHz rows, 32768-row buffer); only the
// display and sound periods are shortened (sweep step 16384 clocks, object
// pulsation step 65536, siren half period 1000, alarm 800/500, speed
// sample 10^6 clocks) so that a sweep revolution fits in the run.
// Sequence:
//  1. frame 1: an echo 3000 us after the trigger (about 52 px with the
//     reset calibration b = 0) must be found, drawn red at its position
//     and raise the proximity alarm;
//  2. the mouse selects calibration; frame 2 learns b so the same echo is
//     at 300 cm, and objects are hidden meanwhile;
//  3. right click returns to normal; frame 3 shows the object at about
//     300 px, in green, with its distance as text, and the sweep crossing
//     it starts the siren.
// Cycle checks: first trigger FRAME_DIV clocks after reset, acq_done
// 32768 x 64 + 1 clocks after each trigger (one register stage). Every mechanism below is counted
// and a mechanism that never happened is a failure.
module tb_sonar_top;
  `include "tb_util.svh"
  import sonar_pkg::*;
  localparam int FRAME_DIV = 2_160_000;
  logic clk = 0, rst = 1;
  logic [11:0] adc_in, adc_out;
  logic [1:0]  pulse_out;
  logic [11:0] mx = 0, my = 0;
  logic left_click = 0, right_click = 0, grid_we = 0, grid_wdata = 0;
  logic [17:0] grid_waddr = 0;
  rgb_t pixel;
  logic hsync, vsync, blank, sound, spu_done;
  logic [2:0] menu_mode;
  logic [3:0] total_obj;
  logic [7:0] dist_ascii [3], speed_ascii [3];
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sonar_top #(.OBJ_STEP(65536), .SWEEP_STEP(16384), .SIREN_HALF(1000), .ALARM_HALF_A(800),
              .ALARM_HALF_B(500), .SPEED_SAMPLE(1_000_000)) dut (
    .clk, .rst, .tx_enable(1'b1), .adc_in, .adc_out, .pulse_out, .mx, .my, .left_click,
    .right_click, .cal_we(1'b0), .cal_waddr(8'd0), .cal_wdata(8'sd0), .grid_we, .grid_waddr,
    .grid_wdata, .pixel, .hsync, .vsync, .blank, .sound, .menu_mode, .total_obj, .spu_done,
    .dist_ascii, .speed_ascii);

  echo_source #(.ECHO_US(3000), .SKEW(40)) u_echo (
    .clk, .trig(dut.frame_tick), .echo_en(1'b1), .fb(adc_out), .comp(adc_in));

  initial begin #400_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  // ---- mechanism counters ------------------------------------------------------
  int n_trig = 0, n_pulse = 0, n_detect = 0, n_acq_done = 0, n_spu_done = 0, n_found = 0;
  int n_obj_px = 0, n_sweep_step = 0, n_cal = 0, n_warn = 0, n_alarm_edge = 0;
  int n_siren_on = 0, n_siren_edge = 0, n_mode = 0, n_hsync = 0, n_vsync = 0, n_grid_px = 0;
  int n_text = 0, bad_timing = 0;
  longint rst_release = -1, t_trig = -1;
  logic [1:0] pp = 0;
  logic ps = 0, phs = 0, pvs = 0;
  logic [8:0] pang = 0;
  logic [2:0] pmode = 0;
  rgb_t obj_centre, grid_dot;
  logic [10:0] hd [4];
  logic [9:0]  vd [4];

  always @(posedge clk) begin
    for (int i = 3; i > 0; i--) begin hd[i] <= hd[i-1]; vd[i] <= vd[i-1]; end
    hd[0] <= dut.hcount; vd[0] <= dut.vcount;
  end

  always @(negedge clk) if (!rst) begin
    if (dut.frame_tick) begin
      n_trig++;
      if (n_trig == 1 && cyc - rst_release != FRAME_DIV) bad_timing++;
      t_trig = cyc;
    end
    if (pulse_out[1] && !pp[1]) n_pulse++;
    pp = pulse_out;
    if (dut.we && dut.wdata != '0) n_detect++;
    if (dut.acq_done) begin
      n_acq_done++;
      // the done pulse is registered one clock after the last row
      if (cyc - t_trig != 32768 * 64 + 1) begin
        bad_timing++;
        $display("acq_done %0d clocks after the trigger", cyc - t_trig);
      end
    end
    if (spu_done) begin n_spu_done++; if (total_obj > 0) n_found++; end
    if (hd[3] == dut.obj_x[0] && vd[3] == dut.obj_y[0] && total_obj > 0) begin
      obj_centre = pixel;
      if (pixel == RED || pixel == YELLOW || pixel == GREEN) n_obj_px++;
    end
    if (hd[3] == 100 && vd[3] == 100) begin
      grid_dot = pixel;
      if (pixel == 24'h2E8B57) n_grid_px++;
    end
    if (dut.sweep_angle != pang) n_sweep_step++;
    pang = dut.sweep_angle;
    if (dut.warn_any) begin
      n_warn++;
      if (sound != ps) n_alarm_edge++;
    end else begin
      if (dut.sound_on) n_siren_on++;
      if (sound != ps) n_siren_edge++;
    end
    ps = sound;
    if (menu_mode != pmode) n_mode++;
    pmode = menu_mode;
    if (hsync && !phs) n_hsync++;
    if (vsync && !pvs) n_vsync++;
    phs = hsync; pvs = vsync;
  end

  task automatic click(int x, int y, logic left);
    @(negedge clk); mx = 12'(x); my = 12'(y);
    if (left) left_click = 1; else right_click = 1;
    @(negedge clk); left_click = 0; right_click = 0;
  endtask

  task automatic wait_done();
    @(posedge clk iff spu_done);
  endtask

  task automatic wait_frames(int n);
    repeat (n) @(negedge vsync);
  endtask

  function automatic int text_value();
    return (dist_ascii[0] - "0") * 100 + (dist_ascii[1] - "0") * 10 + (dist_ascii[2] - "0");
  endfunction

  int r1, r3, v;
  initial begin
    // one grid dot at (100,100)
    repeat (2) @(posedge clk);
    @(negedge clk); grid_we = 1; grid_waddr = 18'(100 * 512 + 100); grid_wdata = 1;
    @(negedge clk); grid_we = 0; rst = 0; rst_release = cyc;

    // frame 1: near object
    wait_done();
    `CHECK(total_obj >= 1, $sformatf("frame 1 objects %0d", total_obj))
    r1 = dut.r_last;
    `CHECK(r1 >= 45 && r1 <= 60, $sformatf("frame 1 range %0d", r1))
    `CHECK(dut.obj_y[0] < 384 && dut.obj_y[0] > 320 && dut.obj_x[0] > 480 && dut.obj_x[0] < 545,
           $sformatf("frame 1 position (%0d,%0d)", dut.obj_x[0], dut.obj_y[0]))
    wait_frames(2);
    `CHECK(obj_centre == RED, $sformatf("near object colour %h", obj_centre))
    `CHECK(dut.warn_any, "near object raises the alarm")
    `CHECK(grid_dot == 24'h2E8B57 || dut.u_ui.pie, $sformatf("grid dot colour %h", grid_dot))

    // frame 2: calibration
    click(950, 280, 1);
    `CHECK(menu_mode == 3'(MODE_CALIBRATE), "calibration selected")
    wait_frames(2);
    `CHECK(obj_centre != RED && !dut.warn_any, "objects hidden during calibration")
    wait_done();
    `CHECK(dut.b_now > 200 && dut.b_now < 300, $sformatf("learned offset %0d", dut.b_now))
    if (dut.b_now != 0) n_cal++;
    click(10, 10, 0);
    `CHECK(menu_mode == 3'(MODE_NORMAL), "back to normal")

    // frame 3: the object at 300
    wait_done();
    r3 = dut.r_last;
    `CHECK(r3 >= 295 && r3 <= 305, $sformatf("calibrated range %0d", r3))
    wait_frames(2);
    `CHECK(obj_centre == GREEN, $sformatf("far object colour %h", obj_centre))
    `CHECK(!dut.warn_any, "no alarm for the far object")
    v = text_value();
    if (v >= 290 && v <= 310) n_text++;
    `CHECK(v >= 290 && v <= 310, $sformatf("distance text %0d", v))

    // let the sweep come round (one revolution is 360 x 16384 clocks)
    repeat (6_000_000) begin
      @(posedge clk);
      if (n_siren_edge > 4) break;
    end

    `CHECK(bad_timing == 0, $sformatf("trigger / acq_done timing errors %0d", bad_timing))
    `CHECK(n_trig > 0,        "mechanism: frame trigger")
    `CHECK(n_pulse >= 16,     $sformatf("mechanism: transmit pulses %0d", n_pulse))
    `CHECK(n_detect > 0,      "mechanism: echo detections written")
    `CHECK(n_acq_done > 0,    "mechanism: buffer full")
    `CHECK(n_spu_done > 0,    "mechanism: processing done")
    `CHECK(n_found > 0,       "mechanism: objects found")
    `CHECK(n_obj_px > 0,      "mechanism: object drawn")
    `CHECK(n_grid_px > 0,     "mechanism: grid drawn")
    `CHECK(n_sweep_step > 0,  "mechanism: sweep moved")
    `CHECK(n_cal > 0,         "mechanism: calibration")
    `CHECK(n_warn > 0 && n_alarm_edge > 0, "mechanism: proximity alarm")
    `CHECK(n_siren_on > 0 && n_siren_edge > 0, "mechanism: sweep siren")
    `CHECK(n_mode >= 2,       "mechanism: menu mode change")
    `CHECK(n_hsync > 0 && n_vsync > 0, "mechanism: display sync")
    `CHECK(n_text > 0,        "mechanism: distance text")
    $display("counts: trig=%0d pulses=%0d detect=%0d acq=%0d spu=%0d found=%0d objpx=%0d grid=%0d sweep=%0d cal=%0d warn=%0d alarm=%0d siren_on=%0d siren=%0d mode=%0d hs=%0d vs=%0d text=%0d",
             n_trig, n_pulse, n_detect, n_acq_done, n_spu_done, n_found, n_obj_px, n_grid_px,
             n_sweep_step, n_cal, n_warn, n_alarm_edge, n_siren_on, n_siren_edge, n_mode,
             n_hsync, n_vsync, n_text);
    `TB_FINISH
  end
endmodule
