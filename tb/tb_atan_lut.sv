// tb_atan_lut: checks random first-quadrant points and the edges of the
// table: one clock after addr = dy*512 + dx the angle must be
// round(atan2(dy, dx)) in degrees (0 along dy = 0, 90 along dx = 0, 45 on
// the diagonal).
module tb_atan_lut;
  `include "tb_util.svh"
  logic clk = 0;
  logic [17:0] addr = 0;
  logic [6:0] angle;
  always #5 clk = ~clk;
  atan_lut dut (.clk, .addr, .angle);

  initial begin #10_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  function automatic int ref_angle(int dx, int dy);
    return $rtoi($atan2(real'(dy), real'(dx)) * 180.0 / 3.14159265358979 + 0.5);
  endfunction

  task automatic probe(int dx, int dy);
    @(negedge clk); addr = 18'(dy * 512 + dx);
    @(negedge clk);
    `CHECK(angle == 7'(ref_angle(dx, dy)), $sformatf("(%0d,%0d) angle %0d expected %0d", dx, dy, angle, ref_angle(dx, dy)))
  endtask

  initial begin
    probe(100, 0); probe(0, 100); probe(200, 200); probe(511, 383); probe(1, 383);
    `CHECK(angle == 7'd90, "steep point near 90")
    for (int i = 0; i < 5000; i++) probe($urandom_range(0, 511), $urandom_range(0, 383));
    `TB_FINISH
  end
endmodule
