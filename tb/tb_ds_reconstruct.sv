// tb_ds_reconstruct: checks the delta-sigma waveform reconstruction.
// Part 1 feeds biased random comparator bits for 200,000 cycles (three bias
// windows of 2^16 cycles) and compares data_out every cycle with a bit-exact
// model: 3-flop synchroniser, running sum +-2^16, minus (bias average >>> 6),
// minus (sum >>> 16), bias average updated once per window from an up/down
// count. It also checks adc_out is the input delayed by 3 clocks.
// Part 2 closes the loop through the behavioural front end with a 40 kHz
// (1620-cycle) sine and checks that data_out carries a strong 40 kHz
// component, found by correlating over 8 periods.
module tb_ds_reconstruct;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, adc_in = 0, adc_out;
  logic signed [15:0] data_out;
  logic loop_mode = 0;
  logic comp;
  real  ain = 0.0;
  always #5 clk = ~clk;

  ds_reconstruct dut (.clk, .rst, .adc_in(loop_mode ? comp : adc_in), .adc_out, .data_out);
  ds_frontend_model fe (.clk, .ain, .fb(adc_out), .comp);

  initial begin #50_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int sum, bias, updown, win, d_in, step;
    logic [2:0] sync;
    real cs, sn, amp;
    repeat (2) @(posedge clk);
    rst <= 0;
    sum = 0; bias = 0; updown = 0; win = 0; sync = 0;
    for (int i = 0; i < 200_000; i++) begin
      adc_in <= ($urandom_range(0, 99) < 58);
      @(posedge clk);
      // model of the clock edge just taken (uses values before the edge)
      step = sync[2] ? 65536 : -65536;
      sum  = sum + step - (bias >>> 6) - (sum >>> 16);
      if (win == 0) begin
        bias   = bias - (bias >>> 6) + updown;
        updown = sync[2] ? 1 : -1;
      end else updown = updown + (sync[2] ? 1 : -1);
      win  = (win + 1) % 65536;
      sync = {sync[1:0], adc_in};
      #1;
      `CHECK(data_out == 16'(sum >>> 11), $sformatf("cycle %0d data_out %0d model %0d", i, data_out, 16'(sum >>> 11)))
      if (i % 16 == 0) `CHECK(adc_out == sync[2], "adc_out is the synchronised bit")
    end
    // part 2: closed loop with a 40 kHz tone
    loop_mode = 1;
    for (int i = 0; i < 1620 * 40; i++) begin
      ain = 0.4 * $sin(2.0 * 3.14159265 * i / 1620.0);
      @(posedge clk);
    end
    cs = 0; sn = 0;
    for (int i = 0; i < 1620 * 8; i++) begin
      ain = 0.4 * $sin(2.0 * 3.14159265 * i / 1620.0);
      @(posedge clk); #1;
      sn += data_out * $sin(2.0 * 3.14159265 * i / 1620.0);
      cs += data_out * $cos(2.0 * 3.14159265 * i / 1620.0);
    end
    amp = 2.0 * $sqrt(sn * sn + cs * cs) / (1620.0 * 8);
    $display("40 kHz amplitude at data_out: %0.1f", amp);
    `CHECK(amp > 300.0, $sformatf("40 kHz tone too weak: %0.1f", amp))
    `TB_FINISH
  end
endmodule
