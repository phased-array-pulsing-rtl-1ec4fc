// tb_param_manager: a stays at 285; b resets to 0, loads b_cal on
// cal_valid and holds it otherwise.
module tb_param_manager;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, cal_valid = 0;
  logic signed [9:0] b_cal = 0, b, expb;
  logic [9:0] a;
  always #5 clk = ~clk;
  param_manager dut (.clk, .rst, .cal_valid, .b_cal, .a, .b);

  initial begin #1_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0; @(posedge clk); #1;
    `CHECK(b == 0 && a == 285, "reset values")
    expb = 0;
    for (int i = 0; i < 2000; i++) begin
      cal_valid <= ($urandom_range(0, 9) == 0);
      b_cal     <= 10'($urandom);
      @(posedge clk);
      if (cal_valid) expb = b_cal;
      #1 `CHECK(b == expb && a == 285, $sformatf("b %0d expected %0d", b, expb))
    end
    `TB_FINISH
  end
endmodule
