// tb_ds_sync: drives random comparator bits and checks that both outputs
// repeat the input exactly 3 clocks later (three synchroniser flops).
module tb_ds_sync;
  `include "tb_util.svh"
  logic clk = 0, comp_in = 0, fb_out, bit_out;
  logic [3:0] hist;
  always #5 clk = ~clk;
  ds_sync dut (.clk, .comp_in, .fb_out, .bit_out);

  initial begin #100_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    hist = '0;
    for (int i = 0; i < 2000; i++) begin
      comp_in <= 1'($urandom);
      @(posedge clk);
      hist = {hist[2:0], comp_in};
      #1;
      if (i >= 3) begin
        `CHECK(bit_out == hist[2], $sformatf("bit_out at %0d", i))
        `CHECK(fb_out == bit_out, "fb_out equals bit_out")
      end
    end
    `TB_FINISH
  end
endmodule
