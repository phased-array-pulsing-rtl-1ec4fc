// tb_enable_divider: checks the 1 MHz enable divider at its default DIV=64.
// Counts the cycles between ticks (must be exactly 64, one cycle wide) and
// the delay of the first tick after reset (64 cycles).
module tb_enable_divider;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, tick;
  always #5 clk = ~clk;
  enable_divider dut (.clk, .rst, .tick);

  initial begin #2_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int last, n, cyc;
    repeat (3) @(posedge clk);
    rst <= 0;
    cyc = 0; last = -1; n = 0;
    while (n < 200) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        if (last < 0) `CHECK(cyc == 64, $sformatf("first tick after %0d cycles", cyc))
        else          `CHECK(cyc - last == 64, $sformatf("tick spacing %0d", cyc - last))
        last = cyc; n++;
      end
    end
    `TB_FINISH
  end
endmodule
