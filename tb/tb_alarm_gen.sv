// tb_alarm_gen: with alarm_on held, the output must toggle every 81000
// clocks for 300 toggles (400 Hz), then every 46286 clocks for 300 toggles
// (700 Hz), then 81000 again; dropping alarm_on silences it at once.
module tb_alarm_gen;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, alarm_on = 0, audio;
  always #5 clk = ~clk;
  alarm_gen dut (.clk, .rst, .alarm_on, .audio);

  initial begin #1_000_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int n, e, gaps [$];
    longint last, c;
    logic prev;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    `CHECK(!audio, "silent when off")
    alarm_on = 1;
    last = 0; prev = audio; c = 0;
    while (gaps.size() < 610) begin
      @(negedge clk); c++;
      if (audio != prev) begin gaps.push_back(int'(c - last)); last = c; end
      prev = audio;
    end
    n = 0;
    for (int i = 0; i < 610; i++) begin
      e = (i < 300) ? 81000 : (i < 600) ? 46286 : 81000;
      if (gaps[i] != e) n++;
    end
    `CHECK(n == 0, $sformatf("%0d half periods wrong (first %0d, 301st %0d)", n, gaps[0], gaps[300]))
    alarm_on = 0;
    repeat (2) @(negedge clk);
    `CHECK(!audio, "silent after alarm_on drops")
    `TB_FINISH
  end
endmodule
