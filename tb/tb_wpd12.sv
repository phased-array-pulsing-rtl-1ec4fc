// tb_wpd12: twelve-channel wave package scan over a modelled echo buffer
// (one-clock read latency). The buffer holds two echoes: channel c has ones
// in rows 5000+2c .. 5029+2c and 9000+c .. 9039+c. Expected: after restart
// and start, done with t1 = 5000+2c, t2 = 5030+2c per channel; a second
// start (no restart) finds the second echo; a third start scans to the end
// and reports done with finished. Also checks that a scan reads one row per
// clock (the end of the 32760-row buffer is reached in about that many
// clocks).
module tb_wpd12;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, restart = 0, start = 0, done, finished;
  logic [14:0] raddr;
  logic [11:0] rdata;
  logic [15:0] t1 [12], t2 [12];
  logic [11:0] mem [32768];
  always #5 clk = ~clk;
  always @(posedge clk) rdata <= mem[raddr];
  wpd12 dut (.clk, .rst, .restart, .start, .raddr, .rdata, .t1, .t2, .done, .finished);

  initial begin #10_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  task automatic scan(output int cycles);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 0;
    while (!done && cycles < 40000) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    for (int a = 0; a < 32768; a++) mem[a] = '0;
    for (int c = 0; c < 12; c++) begin
      for (int k = 0; k < 30; k++) mem[5000 + 2*c + k][c] = 1'b1;
      for (int k = 0; k < 40; k++) mem[9000 + c + k][c] = 1'b1;
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    scan(cyc);
    `CHECK(done && !finished, "first echo found")
    for (int c = 0; c < 12; c++)
      `CHECK(t1[c] == 16'(5000 + 2*c) && t2[c] == 16'(5030 + 2*c),
             $sformatf("ch %0d t1 %0d t2 %0d", c, t1[c], t2[c]))
    scan(cyc);
    `CHECK(done && !finished, "second echo found")
    for (int c = 0; c < 12; c++)
      `CHECK(t1[c] == 16'(9000 + c) && t2[c] == 16'(9040 + c),
             $sformatf("ch %0d t1 %0d t2 %0d", c, t1[c], t2[c]))
    scan(cyc);
    `CHECK(done && finished, "scan reaches the end")
    `CHECK(cyc > 32760 - 9100 - 10 && cyc < 32760 - 9000 + 10, $sformatf("final scan took %0d clocks", cyc))
    `TB_FINISH
  end
endmodule
