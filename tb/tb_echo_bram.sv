// tb_echo_bram: checks the 12-bit x 32K echo buffer: random writes are
// mirrored in a model; reads at random addresses must return the model's
// row one clock after the address (synchronous read), including reads of
// a location written in the same clock (old data is returned).
module tb_echo_bram;
  `include "tb_util.svh"
  logic clk = 0, we = 0;
  logic [14:0] waddr = 0, raddr = 0;
  logic [11:0] wdata = 0, rdata;
  logic [11:0] model [32768];
  logic [11:0] expect_q;
  always #5 clk = ~clk;
  echo_bram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin #10_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    // fill everything first so no read sees uninitialised memory
    for (int a = 0; a < 32768; a++) begin
      we <= 1; waddr <= 15'(a); wdata <= 12'($urandom); model[a] = 'x;
      @(posedge clk); model[a] = wdata;
    end
    for (int i = 0; i < 20000; i++) begin
      we    <= 1'($urandom);
      waddr <= 15'($urandom_range(0, 63));
      wdata <= 12'($urandom);
      raddr <= 15'($urandom_range(0, 63));
      @(posedge clk);
      expect_q = model[raddr];
      if (we) model[waddr] = wdata;
      #1;
      `CHECK(rdata == expect_q, $sformatf("read %0d got %h expected %h", raddr, rdata, expect_q))
    end
    `TB_FINISH
  end
endmodule
