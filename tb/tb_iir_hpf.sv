// tb_iir_hpf: compares the single-pole high-pass filter (SHIFT=10) with a
// bit-exact model y += (x0 - x1) - (y >>> 10) for random inputs and random
// enables, then checks that a constant input decays toward zero.
module tb_iir_hpf;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, en = 0;
  logic signed [15:0] din = 0, dout;
  longint x0, x1, y0;
  always #5 clk = ~clk;
  iir_hpf dut (.clk, .rst, .en, .din, .dout);

  initial begin #2_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    logic signed [31:0] yy;
    repeat (2) @(posedge clk);
    rst <= 0; x0 = 0; x1 = 0; y0 = 0;
    for (int i = 0; i < 20000; i++) begin
      en  <= (i > 4000) ? 1'b1 : 1'($urandom);
      din <= (i > 4000) ? 16'sd3000 : 16'($urandom_range(0, 4000)) - 16'sd2000;
      @(posedge clk); #1;
      if (en) begin
        yy = 32'(y0 - (y0 >>> 10) + (x0 - x1));
        x1 = x0;
        x0 = longint'(din) <<< 16;
        y0 = yy;
      end
      `CHECK(dout == 16'(y0 >>> 15), $sformatf("i=%0d dout %0d model %0d", i, dout, y0 >>> 15))
    end
    `CHECK(dout > -20 && dout < 20, $sformatf("DC not removed: %0d", dout))
    `TB_FINISH
  end
endmodule
