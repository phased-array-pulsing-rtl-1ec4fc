// tb_signal_analysis: the whole signal processing unit on a modelled echo
// buffer. Each echo is what the detectors write for a 40 kHz echo: on
// channel c, bursts of 12 ones every 25 rows starting at row t0 + base +
// k*c (the wave front crosses the array at k rows per channel). Three
// echoes at different ranges and bearings are placed. Checks per object:
// range r = (285 * mean(t1 of channels 4..7)) >> 14 (b = 0 after reset),
// dt = 11k, cos = (446*dt) >>> 9, sin = sqrt(2^18 - cos^2),
// x = 512 + (r*cos >>> 9), y = 384 - (r*sin >> 9); total_obj = 3 and one
// done pulse. Then a calibration run (reprogram high) with one echo must
// learn b = 300 - rc so that the object is placed at 300 cm, and the next
// normal run keeps using that b.
module tb_signal_analysis;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0, reprogram = 0, busy, done;
  logic [14:0] raddr;
  logic [11:0] rdata;
  logic [10:0] x [10];
  logic [9:0]  y [10];
  logic [3:0]  total_obj;
  logic [9:0]  r_last;
  logic signed [9:0] cos_last, b_now;
  logic [11:0] mem [32768];
  always #5 clk = ~clk;
  always @(posedge clk) rdata <= mem[raddr];
  signal_analysis dut (.clk, .rst, .start, .reprogram, .raddr, .rdata, .x, .y, .total_obj,
                       .r_last, .cos_last, .b_now, .busy, .done,
                       .cal_we(1'b0), .cal_waddr(8'd0), .cal_wdata(8'sd0));

  initial begin #50_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  int ex [3], ey [3], er [3];

  task automatic clear_mem();
    for (int a = 0; a < 32768; a++) mem[a] = '0;
  endtask

  // place an echo and return the expected range before offset, x and y
  task automatic place(input int t0, input int k, input int b, output int rc, output int xx, output int yy);
    int s, c, cs, rr, base;
    base = (k < 0) ? -11 * k : 0;
    for (int ch = 0; ch < 12; ch++)
      for (int n = 0; n < 6; n++)
        for (int j = 0; j < 12; j++) mem[t0 + base + k * ch + 25 * n + j][ch] = 1'b1;
    // t1 of channels 4..7
    s = 0;
    for (int ch = 4; ch < 8; ch++) s += t0 + base + k * ch;
    rc = (285 * (s / 4)) >> 14;
    rr = rc + b; if (rr < 0) rr = 0; if (rr > 1023) rr = 1023;
    cs = (446 * 11 * k) >>> 9; if (cs > 511) cs = 511; if (cs < -511) cs = -511;
    c  = $floor($sqrt(262144.0 - cs * cs));
    xx = 512 + ((rr * cs) >>> 9); yy = 384 - ((rr * c) >> 9);
    if (xx > 1023) xx = 1023; if (xx < 0) xx = 0; if (yy < 0) yy = 0; if (yy > 767) yy = 767;
  endtask

  task automatic run(input logic rep, output int cycles, output int dones);
    @(negedge clk); reprogram = rep; start = 1; @(negedge clk); start = 0;
    cycles = 0; dones = 0;
    while (dones == 0 && cycles < 200000) begin @(negedge clk); cycles++; if (done) dones++; end
    repeat (20) begin @(negedge clk); if (done) dones++; end
  endtask

  initial begin
    int rc, xx, yy, cyc, nd, kk [3], t0s [3];
    t0s = '{6000, 14000, 23000};
    kk  = '{2, -3, 0};
    clear_mem();
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3; i++) begin place(t0s[i], kk[i], 0, rc, xx, yy); er[i] = rc; ex[i] = xx; ey[i] = yy; end
    run(0, cyc, nd);
    $display("three-object run: %0d clocks", cyc);
    `CHECK(nd == 1, $sformatf("done pulses %0d", nd))
    `CHECK(total_obj == 3, $sformatf("total_obj %0d", total_obj))
    for (int i = 0; i < 3; i++)
      `CHECK(x[i] == 11'(ex[i]) && y[i] == 10'(ey[i]),
             $sformatf("object %0d at (%0d,%0d) expected (%0d,%0d), r %0d", i, x[i], y[i], ex[i], ey[i], er[i]))
    `CHECK(cyc < 40000, "one pass over the buffer")
    // calibration with one echo
    clear_mem();
    place(17000, 1, 0, rc, xx, yy);
    run(1, cyc, nd);
    `CHECK(b_now == 10'(300 - rc), $sformatf("learned b %0d expected %0d", b_now, 300 - rc))
    `CHECK(r_last == 10'd300, $sformatf("calibration range %0d", r_last))
    // normal run keeps b
    clear_mem();
    place(17000, 1, 300 - rc, rc, xx, yy);
    run(0, cyc, nd);
    `CHECK(total_obj == 1 && r_last == 10'd300 && x[0] == 11'(xx) && y[0] == 10'(yy),
           $sformatf("after calibration: n %0d r %0d (%0d,%0d) expected (%0d,%0d)", total_obj, r_last, x[0], y[0], xx, yy))
    `TB_FINISH
  end
endmodule
