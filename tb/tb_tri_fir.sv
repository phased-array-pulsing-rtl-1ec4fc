// tb_tri_fir: checks the triangle FIR (taps 1 3 5 7 7 5 3 1). The impulse
// response must be those taps in order, one per enabled sample; random
// input with random enables is compared with a direct-form model of the
// last eight enabled samples.
module tb_tri_fir;
  `include "tb_util.svh"
  localparam int TAP [8] = '{1, 3, 5, 7, 7, 5, 3, 1};
  logic clk = 0, rst = 1, en = 0;
  logic signed [15:0] din = 0;
  logic signed [20:0] dout;
  int hist [8];
  always #5 clk = ~clk;
  tri_fir dut (.clk, .rst, .en, .din, .dout);

  initial begin #1_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  function automatic int model();
    int s = 0;
    for (int i = 0; i < 8; i++) s += TAP[i] * hist[i];
    return s;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    foreach (hist[i]) hist[i] = 0;
    // impulse
    for (int i = 0; i < 12; i++) begin
      en <= 1; din <= (i == 0) ? 16'sd100 : 16'sd0;
      @(posedge clk); #1;
      for (int j = 7; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = (i == 0) ? 100 : 0;
      `CHECK(dout == 21'(model()), $sformatf("impulse step %0d: %0d", i, dout))
    end
    // random
    for (int i = 0; i < 3000; i++) begin
      en  <= 1'($urandom);
      din <= 16'($urandom);
      @(posedge clk); #1;
      if (en) begin
        for (int j = 7; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = int'(din);
      end
      `CHECK(dout == 21'(model()), $sformatf("random %0d: dout %0d model %0d", i, dout, model()))
    end
    `TB_FINISH
  end
endmodule
