// tb_echo_addr_gen: checks the echo buffer address counter at its default
// 15-bit width with a tick every 4 cycles: after frame_start each tick
// gives one write strobe at the next address from 0; after 32768 writes it
// pulses full once and stops writing; a new frame_start restarts at 0.
module tb_echo_addr_gen;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, frame_start = 0, tick = 0, we, full;
  logic [14:0] addr;
  always #5 clk = ~clk;
  echo_addr_gen dut (.clk, .rst, .frame_start, .tick, .addr, .we, .full);

  initial begin #10_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int writes, fulls, expect_addr;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int frame = 0; frame < 2; frame++) begin
      frame_start <= 1; @(posedge clk); frame_start <= 0;
      writes = 0; fulls = 0; expect_addr = 0;
      for (int i = 0; i < 4 * 33000; i++) begin
        tick <= (i % 4 == 0);
        @(posedge clk); #1;
        if (we) begin
          if (writes % 97 == 0 || writes > 32760)
            `CHECK(addr == 15'(expect_addr), $sformatf("addr %0d expected %0d", addr, expect_addr))
          expect_addr++; writes++;
        end
        if (full) begin
          fulls++;
          `CHECK(writes == 32768 && we, "full comes with the last write")
        end
      end
      tick <= 0;
      `CHECK(writes == 32768, $sformatf("writes per frame %0d", writes))
      `CHECK(fulls == 1, $sformatf("full pulses %0d", fulls))
    end
    `TB_FINISH
  end
endmodule
