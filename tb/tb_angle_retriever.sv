// tb_angle_retriever: random phase differences dt. With the correction
// table empty, cos_theta must be clamp((446 * dt) >>> 9, -511, 511) and
// done must come 3 clocks after the clock that takes start. Then one table
// entry is written and a matching (dt, r) must show its offset.
module tb_angle_retriever;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0, done, cal_we = 0;
  logic signed [11:0] dt = 0;
  logic [9:0] r = 0;
  logic signed [9:0] cos_theta;
  logic [7:0] cal_waddr = 0;
  logic signed [7:0] cal_wdata = 0;
  always #5 clk = ~clk;
  angle_retriever dut (.clk, .rst, .start, .dt, .r, .cos_theta, .done, .cal_we, .cal_waddr, .cal_wdata);

  initial begin #5_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  function automatic int cos_of(int d);
    int c = (446 * d) >>> 9;
    return c > 511 ? 511 : c < -511 ? -511 : c;
  endfunction

  task automatic run(input int d, input int rr, output int lat);
    dt <= 12'(d); r <= 10'(rr);
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done && lat < 20);
  endtask

  initial begin
    int lat, d, c;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1000; i++) begin
      d = $urandom_range(0, 1400) - 700;
      run(d, $urandom_range(0, 1023), lat);
      `CHECK(lat == 3, $sformatf("done after %0d", lat))
      `CHECK(cos_theta == 10'(cos_of(d)), $sformatf("dt %0d cos %0d expected %0d", d, cos_theta, cos_of(d)))
    end
    // table offset for cos in [128,160) and r in [80,88)
    cal_we <= 1; cal_waddr <= {4'd4, 4'd10}; cal_wdata <= -8'sd20;
    @(posedge clk); cal_we <= 0;
    d = 165;                      // (446*165)>>>9 = 143
    run(d, 84, lat);
    c = cos_of(d) - 20;
    `CHECK(cos_theta == 10'(c), $sformatf("corrected cos %0d expected %0d", cos_theta, c))
    `TB_FINISH
  end
endmodule
