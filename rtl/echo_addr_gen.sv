// echo_addr_gen: write address of the echo buffer.
// The 30 Hz frame trigger (which also fires the transmit pulse) clears the
// address to 0, so an address is the number of ~1 us samples since the pulse.
// Each 1 MHz tick writes the current row and advances the address; at the
// last address (2^AW - 1) writing stops until the next trigger, and 'full'
// pulses once: acquisition of this frame is complete.
// we/addr are registered and describe the write in the same cycle.
module echo_addr_gen #(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          frame_start,
  input  logic          tick,
  output logic [AW-1:0] addr,
  output logic          we,
  output logic          full
);
  logic [AW-1:0] next;
  logic          active;

  always_ff @(posedge clk) begin
    if (rst) begin
      next   <= '0;
      active <= 1'b0;
      we     <= 1'b0;
      addr   <= '0;
      full   <= 1'b0;
    end else if (frame_start) begin
      next   <= '0;
      active <= 1'b1;
      we     <= 1'b0;
      full   <= 1'b0;
    end else begin
      we   <= 1'b0;
      full <= 1'b0;
      if (tick && active) begin
        we   <= 1'b1;
        addr <= next;
        if (next == '1) begin
          active <= 1'b0;
          full   <= 1'b1;
        end else begin
          next <= next + 1'b1;
        end
      end
    end
  end
endmodule
