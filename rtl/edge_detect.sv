// edge_detect: per-channel echo detector at the 1 MHz sample rate.
// When the filtered sample exceeds the threshold and the detector is idle,
// the output goes high for HOLD samples (12 us, about half a 40 kHz period),
// turning each positive half-wave of an echo into a clean pulse. A new
// crossing is looked for only after the hold has run out. detect is a
// registered function of the counter, valid from the tick after the crossing.
module edge_detect #(
  parameter int unsigned HOLD = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  logic signed [20:0] threshold,
  input  logic signed [20:0] din,
  output logic               detect
);
  localparam int unsigned CW = $clog2(HOLD + 1);
  logic [CW-1:0] count;

  assign detect = (count != '0);

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else if (tick) begin
      if (count == '0) begin
        if ($signed({din[20], din}) - $signed({threshold[20], threshold}) > 0)
          count <= CW'(HOLD);
      end else begin
        count <= count - 1'b1;
      end
    end
  end
endmodule
