// tb_pulse_gen_40khz: checks the transmit burst at the default 1620-cycle
// period (40 kHz at 64.8 MHz) and 16 cycles. After a trigger it compares
// both pins every clock with the expected waveform (out_m high in the first
// half period, out_p high from 1/3 to 5/6 of it, one cycle register delay),
// checks busy lasts 16*1620 cycles counted from the trigger edge,
// checks the pins never overlap for the whole burst length of 16*1620
// cycles, counts 16 rising edges on each pin and checks silence afterwards.
module tb_pulse_gen_40khz;
  `include "tb_util.svh"
  localparam int P = 1620, N = 16;
  logic clk = 0, rst = 1, trigger = 0, out_p, out_m, busy;
  always #5 clk = ~clk;
  pulse_gen_40khz dut (.clk, .rst, .trigger, .out_p, .out_m, .busy);

  initial begin #5_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int k, ph, rp, rm, busy_cycles;
    logic pp, pm, exp_p, exp_m;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    `CHECK(!out_p && !out_m && !busy, "idle before trigger")
    for (int burst = 0; burst < 2; burst++) begin
      trigger <= 1; @(posedge clk); trigger <= 0;
      rp = 0; rm = 0; pp = 0; pm = 0; busy_cycles = 0;
      for (k = 0; k < N * P + 200; k++) begin
        @(posedge clk); #1;
        if (busy) busy_cycles++;
        // sample k is k+1 clocks after the trigger edge; the pins show the
        // phase of one clock earlier, which is k
        ph = k % P;
        exp_m = (k < N * P) && (ph < P / 2);
        exp_p = (k < N * P) && (ph >= P / 3) && (ph < P * 5 / 6);
        if (k % 7 == 0 || k < 3 || (k > N * P - 3 && k < N * P + 3))
          `CHECK(out_m == exp_m && out_p == exp_p,
                 $sformatf("k=%0d pins %b%b exp %b%b", k, out_p, out_m, exp_p, exp_m))
        if (out_p && !pp) rp++;
        if (out_m && !pm) rm++;
        pp = out_p; pm = out_m;
      end
      `CHECK(rp == N && rm == N, $sformatf("edges p=%0d m=%0d", rp, rm))
      `CHECK(busy_cycles == N * P - 1, $sformatf("busy for %0d cycles", busy_cycles))
    end
    `TB_FINISH
  end
endmodule
