// tb_downsample_filter: checks the 1 MHz stage (high-pass shift 6, then
// triangle FIR, both stepped only on sample_en) against the bit-exact
// models with a sample enable every 64 cycles, as in the system, and
// checks the output is unchanged between enables.
module tb_downsample_filter;
  `include "tb_util.svh"
  `include "filt_models.svh"
  logic clk = 0, rst = 1, sample_en = 0;
  logic signed [15:0] din = 0;
  logic signed [20:0] dout, prev;
  always #5 clk = ~clk;
  downsample_filter dut (.clk, .rst, .sample_en, .din, .dout);

  initial begin #20_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    hpf_model hp = new(6);
    fir_model fir = new();
    int e;
    repeat (2) @(posedge clk);
    rst <= 0;
    e = 0;
    for (int i = 0; i < 64 * 1500; i++) begin
      sample_en <= (i % 64 == 63);
      din <= 16'(int'(6000.0 * $sin(2.0 * 3.14159265 * i / 1620.0)) + $urandom_range(0, 200));
      prev = dout;
      @(posedge clk);
      if (sample_en) begin
        e = fir.step(hp.out());
        void'(hp.step(int'(din)));
      end
      #1;
      if (sample_en)
        `CHECK(dout == 21'(e), $sformatf("i=%0d dout %0d model %0d", i, dout, e))
      else if (i % 13 == 0)
        `CHECK(dout == prev, "output holds between enables")
    end
    `TB_FINISH
  end
endmodule
