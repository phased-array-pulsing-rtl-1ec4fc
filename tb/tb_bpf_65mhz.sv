// tb_bpf_65mhz: checks the full-rate filter chain (low-pass shift 6, then
// high-pass shift 10, then triangle FIR, output bits [20:5]) against the
// bit-exact software models for random input, then checks its purpose:
// a DC offset is removed while a 40 kHz tone (1620-cycle period) passes.
module tb_bpf_65mhz;
  `include "tb_util.svh"
  `include "filt_models.svh"
  logic clk = 0, rst = 1;
  logic signed [15:0] din = 0, dout;
  always #5 clk = ~clk;
  bpf_65mhz dut (.clk, .rst, .din, .dout);

  initial begin #20_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    lpf_model lp = new(6);
    hpf_model hp = new(10);
    fir_model fir = new();
    int e, peak;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 40000; i++) begin
      din <= (i < 20000) ? 16'($urandom_range(0, 20000) - 10000) :
             16'(int'(2000.0 + 3000.0 * $sin(2.0 * 3.14159265 * i / 1620.0)));
      @(posedge clk);
      // the three stages all update on this edge from their old inputs
      e = fir.step(hp.out());
      void'(hp.step(lp.out()));
      void'(lp.step(int'(din)));
      #1;
      `CHECK(dout == 16'(e >>> 5), $sformatf("i=%0d dout %0d model %0d", i, dout, e >>> 5))
    end
    peak = 0;
    for (int i = 0; i < 3240; i++) begin
      din <= 16'(int'(2000.0 + 3000.0 * $sin(2.0 * 3.14159265 * i / 1620.0)));
      @(posedge clk); #1;
      if (dout > peak) peak = dout;
      if (-dout > peak) peak = -dout;
    end
    $display("40 kHz output peak %0d", peak);
    `CHECK(peak > 8000, "40 kHz tone passes")
    // DC only
    din <= 16'sd5000;
    repeat (30000) @(posedge clk);
    #1;
    `CHECK(dout > -200 && dout < 200, $sformatf("DC removed: %0d", dout))
    `TB_FINISH
  end
endmodule
