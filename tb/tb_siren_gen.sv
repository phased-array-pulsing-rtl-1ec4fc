// tb_siren_gen: a one-clock sound_on must give a tone that starts high,
// toggles every 60000 clocks, lasts 150 half periods (the first rise and
// 149 toggles; it then ends low) and then stays low; sound_on during the tone is ignored; a new
// sound_on after the tone starts another.
module tb_siren_gen;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, sound_on = 0, audio;
  always #5 clk = ~clk;
  siren_gen dut (.clk, .rst, .sound_on, .audio);

  initial begin #1_000_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int toggles, bad;
    longint last, c;
    logic prev;
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (10) @(negedge clk);
    `CHECK(!audio, "silent while idle")
    for (int tone = 0; tone < 2; tone++) begin
      @(negedge clk); sound_on = 1; @(negedge clk); sound_on = 0;
      `CHECK(audio, "tone starts high")
      toggles = 1; bad = 0; last = 0; prev = audio;
      for (c = 1; c < 151 * 60000; c++) begin
        if (c == 1000000) sound_on = 1;    // ignored during the tone
        if (c == 1000001) sound_on = 0;
        @(negedge clk);
        if (audio != prev) begin
          toggles++;
          if (c - last != 60000) bad++;
          last = c;
        end
        prev = audio;
      end
      `CHECK(toggles == 150, $sformatf("toggles %0d", toggles))
      `CHECK(bad == 0, $sformatf("%0d toggles off the 60000-clock spacing", bad))
      `CHECK(!audio, "low after the tone")
    end
    `TB_FINISH
  end
endmodule
