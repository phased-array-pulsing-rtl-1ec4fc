// tb_sweeper: the sweeper with its atan_lut at default parameters
// (30-degree pie, radius^2 116964, a step every 524288 clocks), rspeed 7.
// Checks: the lower bound advances by 7 degrees exactly every 524288 clocks
// and wraps modulo 360; random pixels two clocks after (hcount, vcount)
// give pie/pixel/angle_loc as computed from round(atan2) with the
// quadrant mapping (up-right a, up-left 180-a, down-left 180+a, down-right
// 360-a), the pie test lower <= angle <= lower+30 (mod 360) and the radius
// test; stop freezes the bounds.
module tb_sweeper;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, stop = 0, pie;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic [3:0] rspeed = 4'd7;
  logic [17:0] lut_addr;
  logic [6:0] lut_angle;
  logic [23:0] pixel;
  logic [4:0] angle_loc;
  logic [8:0] lower;
  always #5 clk = ~clk;
  atan_lut u_lut (.clk, .addr(lut_addr), .angle(lut_angle));
  sweeper dut (.clk, .rst, .hcount, .vcount, .rspeed, .stop, .lut_addr, .lut_angle,
               .pixel, .pie, .angle_loc, .lower);

  initial begin #1_000_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  function automatic void model(int h, int v, int lo, output logic e_pie, output int e_loc);
    int dx, dy, dxc, dyc, a, ang, up, fl, tu;
    logic right, top, near;
    right = h >= 512; top = v < 384;
    dx = right ? h - 512 : 512 - h;
    dy = top ? 384 - v : v - 384;
    dxc = dx > 511 ? 511 : dx; dyc = dy > 383 ? 383 : dy;
    a = $rtoi($atan2(real'(dyc), real'(dxc)) * 180.0 / 3.14159265358979 + 0.5);
    if (right && top) ang = a;
    else if (!right && top) ang = 180 - a;
    else if (!right && !top) ang = 180 + a;
    else ang = (a == 0) ? 0 : 360 - a;
    near = dx * dx + dy * dy <= 116964;
    up = (lo + 30) % 360;
    fl = (ang - lo + 360) % 360;
    tu = (up - ang + 360) % 360;
    e_pie = near && fl <= 30;
    e_loc = e_pie ? tu : 0;
  endfunction

  initial begin
    int hq [3], vq [3], loc_e, steps, lo_prev;
    longint cyc, last_change;
    logic pie_e;
    repeat (2) @(posedge clk);
    rst <= 0;
    steps = 0; cyc = 0; last_change = -1; lo_prev = 0;
    hq = '{0, 0, 0}; vq = '{0, 0, 0};
    while (steps < 60) begin
      @(negedge clk); cyc++;
      hq[2] = hq[1]; hq[1] = hq[0]; hq[0] = $urandom_range(0, 1023);
      vq[2] = vq[1]; vq[1] = vq[0]; vq[0] = $urandom_range(0, 767);
      hcount = 11'(hq[0]); vcount = 10'(vq[0]);
      #1;
      if (lower != 9'(lo_prev)) begin
        `CHECK(lower == 9'((lo_prev + 7) % 360), $sformatf("lower %0d after %0d", lower, lo_prev))
        if (last_change >= 0) `CHECK(cyc - last_change == 524288, $sformatf("step after %0d clocks", cyc - last_change))
        last_change = cyc; lo_prev = lower; steps++;
      end
      if (cyc > 3 && cyc % 5 == 0) begin
        model(hq[2], vq[2], lower, pie_e, loc_e);
        `CHECK(pie == pie_e && angle_loc == 5'(loc_e) && pixel == (pie_e ? 24'h00FF00 : 24'h0),
               $sformatf("(%0d,%0d) lower %0d pie %b loc %0d expected %b %0d", hq[2], vq[2], lower, pie, angle_loc, pie_e, loc_e))
      end
    end
    `CHECK(steps == 60 && lo_prev == (60 * 7) % 360, "bounds wrapped")
    stop = 1;
    repeat (600000) @(negedge clk);
    `CHECK(lower == 9'(lo_prev), "stop freezes the sweep")
    `TB_FINISH
  end
endmodule
