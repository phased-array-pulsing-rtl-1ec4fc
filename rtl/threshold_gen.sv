// threshold_gen: time-varying echo threshold.
// Echo voltage falls roughly as 1/r^2 and r is proportional to the time since
// the pulse, so the threshold follows
//   threshold = MAX_THRESHOLD * (T_MAX_THLD/128)^2 / ((t - TXRX_DELAY)/128)^2
// once t > TXRX_DELAY + T_MAX_THLD, is MAX_THRESHOLD before that (blinding
// the receiver to the direct transmitter-receiver field and to strong close
// reflections) and never drops below MIN_THRESHOLD. t counts 1 MHz ticks since
// the frame trigger and saturates at 0xFFFF.
// On each tick the divider result for the previous count is latched and a new
// division (28 cycles, well inside the 64-cycle tick period) is started, so
// the threshold lags the count by one sample. frame_start (the 30 Hz trigger)
// clears the count and restores MAX_THRESHOLD.
// The law and the reset behaviour follow the document; the bounds and the
// own sequential divider replace a vendor divider core.
module threshold_gen #(
  parameter int unsigned MAX_THRESHOLD = 131072,
  parameter int unsigned MIN_THRESHOLD = 4096,
  parameter int unsigned TXRX_DELAY    = 512,
  parameter int unsigned T_MAX_THLD    = 4096
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               frame_start,
  input  logic               tick,
  output logic signed [20:0] threshold
);
  localparam logic [27:0] DIVIDEND = 28'(MAX_THRESHOLD * (T_MAX_THLD >> 7) * (T_MAX_THLD >> 7));

  logic [15:0] tcount;
  logic [8:0]  tp;
  logic [17:0] divisor;
  logic [27:0] quot;
  logic        div_done;
  logic [27:0] quot_hold;

  assign tp = (tcount > 16'(TXRX_DELAY + T_MAX_THLD)) ? 9'((tcount - 16'(TXRX_DELAY)) >> 7)
                                                      : 9'(T_MAX_THLD >> 7);
  assign divisor = 18'(tp) * 18'(tp);

  udiv_seq #(.NW(28), .DW(18)) u_div (
    .clk(clk), .rst(rst), .start(tick), .dividend(DIVIDEND), .divisor(divisor),
    .quotient(quot), .done(div_done));

  always_ff @(posedge clk) begin
    if (rst || frame_start) quot_hold <= 28'(MAX_THRESHOLD);
    else if (div_done)      quot_hold <= quot;
  end

  always_ff @(posedge clk) begin
    if (rst || frame_start) begin
      tcount    <= '0;
      threshold <= 21'(MAX_THRESHOLD);
    end else if (tick) begin
      if (tcount != 16'hFFFF) tcount <= tcount + 1'b1;
      if (quot_hold > 28'(MIN_THRESHOLD)) threshold <= 21'(quot_hold);
      else                                threshold <= 21'(MIN_THRESHOLD);
    end
  end
endmodule
