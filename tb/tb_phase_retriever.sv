// tb_phase_retriever: each trial fills a modelled echo buffer (one-clock
// read latency) with 25-row square waves, channel c rising at window offset
// (base + k*c) mod 25, i.e. a wave front crossing the array at k rows per
// channel (k = -4..4, so neighbours differ by less than half a period but
// the end channels may differ by several periods). The end channels' t1/t2
// are set so that their mean is the window start and the earlier end has
// the earlier t1. Expected dt = 11*k exactly, which needs the unwrapping.
// Also checks done comes within WINDOW + 12 + 2*11 + 10 clocks.
module tb_phase_retriever;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0, done;
  logic [15:0] t1_0 = 0, t2_0 = 0, t1_11 = 0, t2_11 = 0;
  logic [14:0] raddr;
  logic [11:0] rdata;
  logic signed [11:0] dt;
  logic [11:0] mem [32768];
  always #5 clk = ~clk;
  always @(posedge clk) rdata <= mem[raddr];
  phase_retriever dut (.clk, .rst, .start, .t1_0, .t2_0, .t1_11, .t2_11, .raddr, .rdata, .dt, .done);

  initial begin #20_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  initial begin
    int w0, k, base, off, lat, ok;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int trial = 0; trial < 300; trial++) begin
      // choose k and a base with no channel offset at 0 (mod 25)
      do begin
        k = $urandom_range(0, 8); k = k - 4;
        base = $urandom_range(1, 24);
        ok = 1;
        for (int c = 0; c < 12; c++) if ((((base + k * c) % 25) + 25) % 25 == 0) ok = 0;
      end while (!ok);
      w0 = $urandom_range(1000, 30000);
      for (int a = w0 - 40; a < w0 + 80; a++)
        for (int c = 0; c < 12; c++) begin
          off = (((base + k * c) % 25) + 25) % 25;
          mem[a][c] = ((((a - w0 - off) % 25) + 25) % 25) < 12;
        end
      t1_0  = 16'(w0 - 15);
      t1_11 = 16'(w0 - 15 + 11 * k);
      t2_0  = 16'(w0 + 15);
      t2_11 = 16'(w0 + 15 - 11 * k);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 0;
      while (!done && lat < 200) begin @(negedge clk); lat++; end
      `CHECK(lat <= 28 + 12 + 22 + 10, $sformatf("done after %0d", lat))
      `CHECK(dt == 12'(11 * k), $sformatf("k %0d base %0d dt %0d expected %0d", k, base, dt, 11 * k))
    end
    `TB_FINISH
  end
endmodule
