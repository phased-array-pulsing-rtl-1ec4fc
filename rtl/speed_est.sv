// speed_est: rough radial speed of the nearest-listed object.
// Every SAMPLE_CYCLES cycles (1/3 s at 64.8 MHz) it takes |dist_px - previous
// dist_px| into a DEPTH-entry history and outputs the mean of the history,
// in pixels (cm) per sample period. The mean divides by multiplying with
// round(2^16/DEPTH). The block and its ten-entry history are named by the
// document; the sample period and units are this design's.
module speed_est #(
  parameter int unsigned SAMPLE_CYCLES = 21_600_000,
  parameter int unsigned DEPTH         = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] dist_px,
  output logic [9:0] speed
);
  localparam int unsigned SCW   = $clog2(SAMPLE_CYCLES);
  localparam int unsigned RECIP = (65536 + DEPTH / 2) / DEPTH;
  localparam int unsigned SUMW  = 10 + $clog2(DEPTH + 1);

  logic [SCW-1:0]  cnt;
  logic [9:0]      prev;
  logic [9:0]      hist [DEPTH];
  logic [SUMW-1:0] sum;
  logic [9:0]      delta;
  logic [SUMW+16:0] scaled;

  assign delta  = (dist_px >= prev) ? dist_px - prev : prev - dist_px;
  assign scaled = (SUMW+17)'(sum) * (SUMW+17)'(RECIP);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      prev  <= '0;
      sum   <= '0;
      speed <= '0;
      for (int i = 0; i < DEPTH; i++) hist[i] <= '0;
    end else begin
      speed <= scaled[25:16];
      if (cnt == SCW'(SAMPLE_CYCLES - 1)) begin
        cnt     <= '0;
        prev    <= dist_px;
        hist[0] <= delta;
        for (int i = 1; i < DEPTH; i++) hist[i] <= hist[i-1];
        sum     <= sum + SUMW'(delta) - SUMW'(hist[DEPTH-1]);
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
