// tb_edge_detect: checks the hold-off detector (HOLD=12). Random samples
// and thresholds are applied on ticks; a model asserts detect for exactly
// 12 ticks after a sample above the threshold and ignores samples while
// holding. detect is compared after every tick.
module tb_edge_detect;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, tick = 0, detect;
  logic signed [20:0] threshold = 0, din = 0;
  always #5 clk = ~clk;
  edge_detect dut (.clk, .rst, .tick, .threshold, .din, .detect);

  initial begin #10_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int cnt, runs, runlen, maxrun;
    repeat (2) @(posedge clk);
    rst <= 0;
    cnt = 0; runs = 0; runlen = 0; maxrun = 0;
    for (int i = 0; i < 20000; i++) begin
      threshold <= 21'($urandom_range(1000, 100000));
      din       <= ($urandom_range(0, 19) == 0) ? 21'($urandom_range(100000, 300000))
                                                : 21'($urandom_range(0, 1000)) - 21'sd500;
      tick <= 1; @(posedge clk); tick <= 0;
      if (cnt == 0) begin
        if (din > threshold) cnt = 12;
      end else cnt--;
      #1;
      `CHECK(detect == (cnt != 0), $sformatf("tick %0d detect %b model %0d", i, detect, cnt))
      if (detect) runlen++;
      else begin
        if (runlen > 0) runs++;
        if (runlen > maxrun) maxrun = runlen;
        runlen = 0;
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    `CHECK(runs > 100, "detections happened")
    `CHECK(maxrun % 12 == 0, $sformatf("hold lengths are multiples of 12 ticks: %0d", maxrun))
    `TB_FINISH
  end
endmodule
