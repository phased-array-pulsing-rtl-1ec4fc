// enable_divider: one-cycle enable pulse every DIV clock cycles.
// The whole design runs from a single clock; slower processes advance only on
// such enables. With the 64.8 MHz clock, DIV = 64 gives the ~1 MHz sample
// enable (1.0125 MHz) and DIV = 2,160,000 the 30 Hz frame trigger.
// A down-counter starts at DIV-1 after reset; tick is high in the cycle the
// counter is zero, so the first tick comes DIV cycles after reset is released.
module enable_divider #(
  parameter int unsigned DIV = 64
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  logic [W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= W'(DIV - 1);
      tick  <= 1'b0;
    end else if (count == '0) begin
      count <= W'(DIV - 1);
      tick  <= 1'b1;
    end else begin
      count <= count - 1'b1;
      tick  <= 1'b0;
    end
  end
endmodule
