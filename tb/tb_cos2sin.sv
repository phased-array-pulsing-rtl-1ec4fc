// tb_cos2sin: for every |cos| in Q1.9 (0..512) checks
// sin = floor(sqrt(2^18 - cos^2)) and that ready comes within 16 clocks.
module tb_cos2sin;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0, ready;
  logic [9:0] cos_abs = 0, sin;
  always #5 clk = ~clk;
  cos2sin dut (.clk, .rst, .start, .cos_abs, .sin, .ready);

  initial begin #5_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int lat, e;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int c = 0; c <= 512; c++) begin
      @(negedge clk); cos_abs = 10'(c); start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!ready && lat < 40) begin @(negedge clk); lat++; end
      e = $floor($sqrt(262144.0 - c * c));
      `CHECK(lat <= 16, $sformatf("ready after %0d", lat))
      `CHECK(sin == 10'(e), $sformatf("cos %0d sin %0d expected %0d", c, sin, e))
    end
    `TB_FINISH
  end
endmodule
