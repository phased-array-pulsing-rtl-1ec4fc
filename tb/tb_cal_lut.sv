// tb_cal_lut: checks the bearing correction table. Before any write the
// output equals the input one clock later (table starts at zero). Then
// random entries are written and random (cos, r) pairs must give
// clamp(cos + table[{cos[8:5], r[6:3]}], -511, 511) one clock later.
module tb_cal_lut;
  `include "tb_util.svh"
  logic clk = 0, we = 0;
  logic signed [9:0] cos_in = 0, cos_out;
  logic [9:0] r = 0;
  logic [7:0] waddr = 0;
  logic signed [7:0] wdata = 0;
  int tbl [256];
  always #5 clk = ~clk;
  cal_lut dut (.clk, .cos_in, .r, .cos_out, .we, .waddr, .wdata);

  initial begin #5_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int e;
    foreach (tbl[i]) tbl[i] = 0;
    for (int i = 0; i < 300; i++) begin
      cos_in <= 10'($urandom_range(0, 1022) - 511); r <= 10'($urandom);
      @(posedge clk); #1;
      `CHECK(cos_out == cos_in, "zero table passes the input")
    end
    for (int i = 0; i < 256; i++) begin
      we <= 1; waddr <= 8'(i); wdata <= 8'($urandom);
      @(posedge clk); tbl[i] = int'(wdata);
    end
    we <= 0;
    for (int i = 0; i < 3000; i++) begin
      cos_in <= 10'($urandom_range(0, 1022) - 511); r <= 10'($urandom);
      @(posedge clk); #1;
      e = int'(cos_in) + tbl[{cos_in[8:5], r[6:3]}];
      if (e > 511) e = 511;
      if (e < -511) e = -511;
      `CHECK(cos_out == 10'(e), $sformatf("cos %0d r %0d out %0d expected %0d", cos_in, r, cos_out, e))
    end
    `TB_FINISH
  end
endmodule
