// tb_object_rep: two instances. One at the default step (4194304 clocks)
// checks the pulsation period: rsquared changes from 16 to 18 exactly one
// step after reset and then again one step later. The other, with a short
// step of 16 clocks to cover the whole state machine, checks the rsquared
// sequence against the six-state model (grow by 2 to >= 41, by 1 to 49,
// hold, shrink by 1 to <= 41, by 2 to <= 16, hold) over three cycles.
// Pixels: for random objects and screen points, two clocks later the pixel
// is lit exactly inside (h-x)^2 + (v-y)^2 <= rsquared, red within 110 px
// of the centre, yellow within 220 px, green beyond; warn only when red
// and on; nothing when the object is off.
module tb_object_rep;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, on = 0, warn, warn_f;
  logic [10:0] hcount = 0, x = 512;
  logic [9:0] vcount = 0, y = 384;
  logic [23:0] pixel, pixel_f;
  always #5 clk = ~clk;
  object_rep dut (.clk, .rst, .hcount, .vcount, .x, .y, .on, .pixel, .warn);
  object_rep #(.STEP_CYCLES(16)) fast (.clk, .rst, .hcount, .vcount, .x, .y, .on,
                                       .pixel(pixel_f), .warn(warn_f));

  initial begin #400_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  // expected rsquared sequence of the fast instance, one value per step
  int seq [$];
  initial begin
    int r = 16, st = 0;
    for (int n = 0; n < 200; n++) begin
      case (st)
        0: if (r < 41) r += 2; else st = 1;
        1: if (r < 49) r += 1; else st = 2;
        2: st = 3;
        3: if (r > 41) r -= 1; else st = 4;
        4: if (r > 16) r -= 2; else st = 5;
        default: st = 0;
      endcase
      seq.push_back(r);
    end
  end

  initial begin
    int hq [3], vq [3], d2, c2, rs, n, prev;
    longint t0, t1;
    logic [23:0] col;
    repeat (2) @(posedge clk);
    rst <= 0;
    // fast instance: sample rsquared just after every step
    n = 0;
    for (int i = 0; i < 16 * 150; i++) begin
      @(negedge clk);
      if (i % 16 == 0 && i > 0) begin
        `CHECK(fast.rsquared == 7'(seq[n]), $sformatf("step %0d rsquared %0d expected %0d", n, fast.rsquared, seq[n]))
        n++;
      end
    end
    // random pixels on the fast instance and the default one
    hq = '{0, 0, 0}; vq = '{0, 0, 0};
    for (int i = 0; i < 40000; i++) begin
      if (i % 1000 == 0) begin
        @(negedge clk);
        x = 11'($urandom_range(0, 1023)); y = 10'($urandom_range(0, 767)); on = ($urandom_range(0, 4) != 0);
        repeat (3) @(negedge clk);
      end
      rs = fast.rsquared;   // value used by the compare stage at the next edge
      @(negedge clk);
      hq[2] = hq[1]; hq[1] = hq[0]; hq[0] = int'(x) + $urandom_range(0, 16) - 8;
      vq[2] = vq[1]; vq[1] = vq[0]; vq[0] = int'(y) + $urandom_range(0, 16) - 8;
      if (hq[0] < 0) hq[0] = 0; if (vq[0] < 0) vq[0] = 0;
      hcount = 11'(hq[0]); vcount = 10'(vq[0]);
      #1;
      if (i % 1000 >= 3) begin
        d2 = (hq[2] - x) * (hq[2] - x) + (vq[2] - y) * (vq[2] - y);
        c2 = (x - 512) * (x - 512) + (y - 384) * (y - 384);
        col = c2 <= 12100 ? 24'hFF0000 : c2 <= 48400 ? 24'hFFFF00 : 24'h00FF00;
        `CHECK(pixel_f == ((on && d2 <= rs) ? col : 24'h0),
               $sformatf("pixel %h at d2 %0d r2 %0d c2 %0d on %b", pixel_f, d2, rs, c2, on))
        `CHECK(warn == (on && c2 <= 12100), "warn within 110 px")
      end
    end
    // default step period on the full-size instance
    t0 = -1; t1 = -1;
    for (longint c = 0; c < 3 * 4194304 && t1 < 0; c++) begin
      prev = dut.rsquared;
      @(negedge clk);
      if (dut.rsquared != prev) begin
        if (t0 < 0) t0 = c; else t1 = c;
      end
    end
    `CHECK(t1 - t0 == 4194304, $sformatf("pulsation step %0d clocks", t1 - t0))
    `TB_FINISH
  end
endmodule
