// tb_iir_lpf: compares the single-pole low-pass filter (SHIFT=6) with a
// bit-exact model y += (x_prev >>> 6) - (y >>> 6), scaled by 2^16, output
// bits [30:15], for random inputs with random enables; also checks that a
// constant input settles to twice its value (the 2x output scale).
module tb_iir_lpf;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, en = 0;
  logic signed [15:0] din = 0, dout;
  longint x0, y0;
  always #5 clk = ~clk;
  iir_lpf dut (.clk, .rst, .en, .din, .dout);

  initial begin #2_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    logic signed [31:0] yy;
    repeat (2) @(posedge clk);
    rst <= 0; x0 = 0; y0 = 0;
    for (int i = 0; i < 6000; i++) begin
      en  <= (i > 3000) ? 1'b1 : 1'($urandom);
      din <= (i > 3000) ? 16'sd1000 : 16'($urandom_range(0, 8000)) - 16'sd4000;
      @(posedge clk); #1;
      if (en) begin
        yy = 32'(y0 - (y0 >>> 6) + (x0 >>> 6));
        x0 = longint'(din) <<< 16;
        y0 = yy;
      end
      `CHECK(dout == 16'(y0 >>> 15), $sformatf("i=%0d dout %0d model %0d", i, dout, y0 >>> 15))
    end
    `CHECK(dout > 1990 && dout <= 2000, $sformatf("settled value %0d", dout))
    `TB_FINISH
  end
endmodule
