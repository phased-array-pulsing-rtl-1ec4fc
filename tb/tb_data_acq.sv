// tb_data_acq: the whole acquisition side at its default rates, with
// twelve behavioural delta-sigma front ends. Checks:
//  - the first frame trigger comes FRAME_DIV = 2,160,000 cycles after reset
//    (30 Hz) and the transmit burst that follows lasts 16 x 1620 cycles
//    with 16 pulses on each pin;
//  - mhz_tick comes every 64 cycles;
//  - an echo burst injected 3000 us after the trigger is written to the
//    buffer: every channel has detect bits within a few rows of address
//    3000, and no channel detects anything between row 512 (end of the
//    blind time after the pulse) and row 2900. Rows before 512 may still
//    hold the tail of a detection from the previous frame's minimum
//    threshold; the system ignores that time;
//  - acq_done pulses once, 32768 ticks after the trigger, with the last write.
module tb_data_acq;
  `include "tb_util.svh"
  localparam int ECHO_US = 3000;
  logic clk = 0, rst = 1, tx_enable = 1;
  logic [11:0] adc_in, adc_out, wdata;
  logic [1:0]  pulse_out;
  logic        mhz_tick, frame_tick, we, acq_done;
  logic [14:0] waddr;
  logic signed [20:0] threshold;
  real ain [12];
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  data_acq dut (.clk, .rst, .tx_enable, .adc_in, .adc_out, .pulse_out, .mhz_tick,
                .frame_tick, .waddr, .we, .wdata, .acq_done, .threshold);
  for (genvar c = 0; c < 12; c++) begin : g_fe
    ds_frontend_model fe (.clk, .ain(ain[c]), .fb(adc_out[c]), .comp(adc_in[c]));
  end

  initial begin #200_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  longint t_trig = -1, last_tick = -1;
  int     p_edges = 0, m_edges = 0, tick_bad = 0, done_count = 0;
  longint last_pulse = -1, first_pulse = -1, t_done = -1;
  logic   pp = 0, pm = 0;
  int     first_row [12];
  int     early_hits = 0;

  // monitors (reset is released at cycle 2)
  always @(posedge clk) if (!rst) begin
    if (frame_tick && t_trig < 0) t_trig = cyc;
    if (mhz_tick) begin
      if (last_tick >= 0 && cyc - last_tick != 64) tick_bad++;
      last_tick = cyc;
    end
    if (pulse_out[1] && !pp) p_edges++;
    if (pulse_out[0] && !pm) m_edges++;
    if (pulse_out != 0) begin
      if (first_pulse < 0) first_pulse = cyc;
      last_pulse = cyc;
    end
    pp = pulse_out[1]; pm = pulse_out[0];
    if (we) for (int c = 0; c < 12; c++) if (wdata[c]) begin
      if (first_row[c] < 0 && waddr >= 512) first_row[c] = waddr;
      if (waddr >= 512 && waddr < 2900) early_hits++;
    end
    if (acq_done) begin done_count++; t_done = cyc; end
  end

  // analog stimulus: small noise, then an echo burst at ECHO_US after the trigger
  always @(posedge clk) begin
    for (int c = 0; c < 12; c++) begin
      real t;
      int  n;
      n = $urandom_range(0, 100);
      ain[c] = 0.005 * (n - 50) / 50.0;
      if (t_trig >= 0) begin
        t = real'(cyc - t_trig - ECHO_US * 64 - c * 40);
        if (t >= 0 && t < 1620.0 * 16) ain[c] += 0.3 * $sin(2.0 * 3.14159265 * t / 1620.0);
      end
    end
  end

  initial begin
    foreach (first_row[c]) first_row[c] = -1;
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (done_count == 1);
    repeat (100) @(posedge clk);
    `CHECK(t_trig == 2_160_000 + 2, $sformatf("trigger at cycle %0d", t_trig))
    `CHECK(p_edges == 16 && m_edges == 16, $sformatf("pulses p=%0d m=%0d", p_edges, m_edges))
    `CHECK(last_pulse - first_pulse + 1 > 16 * 1620 - 1620 && last_pulse - first_pulse < 16 * 1620,
           $sformatf("burst length %0d cycles", last_pulse - first_pulse + 1))
    `CHECK(tick_bad == 0, "tick every 64 cycles")
    `CHECK(early_hits == 0, $sformatf("detections before the echo: %0d", early_hits))
    for (int c = 0; c < 12; c++)
      `CHECK(first_row[c] >= ECHO_US && first_row[c] < ECHO_US + 30,
             $sformatf("channel %0d first detect row %0d", c, first_row[c]))
    `CHECK((t_done - t_trig) / 64 >= 32768 && (t_done - t_trig) / 64 <= 32770,
           $sformatf("acq_done %0d ticks after trigger", (t_done - t_trig) / 64))
    `TB_FINISH
  end
endmodule
