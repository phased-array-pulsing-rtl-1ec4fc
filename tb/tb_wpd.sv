// tb_wpd: checks the single-channel wave package detector on generated
// rows. Each trial sends, with random gaps in the valid strobe: short noise
// bursts (at most 8 ones, which must be rejected by the rise check of more
// than 9 ones in 12 rows) separated by at least 13 zeros, then a true
// package of 12..60 ones starting at row A, then 40 zeros. Expected:
// t1 = A, t2 = first zero row after the package, rising high after the
// rise check, done high at the end and held until the next start.
module tb_wpd;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0, valid = 0, bit_in = 0, rising, done;
  logic [15:0] t_in = 0, t1, t2;
  always #5 clk = ~clk;
  wpd dut (.clk, .rst, .start, .valid, .bit_in, .t_in, .t1, .t2, .rising, .done);

  initial begin #20_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  // inputs change on the falling edge, the detector samples on the rising
  task automatic send(input logic b, inout int row);
    while ($urandom_range(0, 3) == 0) begin @(negedge clk); valid = 0; end
    @(negedge clk);
    valid = 1; bit_in = b; t_in = 16'(row);
    row++;
  endtask

  task automatic flush();
    @(negedge clk); valid = 0;
  endtask

  initial begin
    int row, a, len, e;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int trial = 0; trial < 200; trial++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      row = $urandom_range(0, 1000);
      repeat ($urandom_range(1, 20)) send(0, row);
      for (int nb = $urandom_range(0, 3); nb > 0; nb--) begin
        repeat ($urandom_range(1, 8)) send(1, row);
        repeat ($urandom_range(13, 30)) send(0, row);
      end
      flush(); `CHECK(!rising && !done, "noise bursts rejected")
      a = row; len = $urandom_range(12, 60);
      repeat (len) send(1, row);
      e = row;
      flush(); `CHECK(rising, $sformatf("rising after package of %0d rows", len))
      repeat (40) send(0, row);
      flush();
      `CHECK(done, "done after the fall")
      `CHECK(t1 == 16'(a), $sformatf("t1 %0d expected %0d", t1, a))
      `CHECK(t2 == 16'(e), $sformatf("t2 %0d expected %0d", t2, e))
      repeat (5) send(1, row);
      flush(); `CHECK(done && t1 == 16'(a), "done holds until the next start")
    end
    `TB_FINISH
  end
endmodule
