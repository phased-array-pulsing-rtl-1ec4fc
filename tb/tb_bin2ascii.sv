// tb_bin2ascii: for random values (and 0, 999, 1000, 1023) checks that
// each result shows the three decimal digits in ASCII, values over 999 as
// "999", and that results come value + 2 clocks apart (one clock to load,
// one per count, one to output).
module tb_bin2ascii;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, valid;
  logic [9:0] value = 0;
  logic [7:0] ascii [3];
  always #5 clk = ~clk;
  bin2ascii dut (.clk, .rst, .value, .ascii, .valid);

  initial begin #20_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int v, sv, gap;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      v = (i == 0) ? 0 : (i == 1) ? 999 : (i == 2) ? 1000 : (i == 3) ? 1023 : $urandom_range(0, 1023);
      @(negedge clk); value = 10'(v);
      // skip the conversion already running, then time a full one
      while (!valid) @(negedge clk);
      gap = 0;
      do begin @(negedge clk); gap++; end while (!valid);
      sv = v > 999 ? 999 : v;
      `CHECK(gap == sv + 2, $sformatf("value %0d took %0d clocks", v, gap))
      `CHECK(ascii[0] == 8'h30 + 8'(sv / 100) && ascii[1] == 8'h30 + 8'((sv / 10) % 10) &&
             ascii[2] == 8'h30 + 8'(sv % 10),
             $sformatf("value %0d shown as %s%s%s", v, ascii[0], ascii[1], ascii[2]))
    end
    `TB_FINISH
  end
endmodule
