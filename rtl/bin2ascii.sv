// bin2ascii: converts a number to three ASCII decimal digits.
// Conversion as in the document: the value is loaded into a counter which
// is decremented once per cycle while a three-digit BCD counter is
// incremented with decimal carries; when the counter reaches zero the BCD
// digits become ASCII ({4'b0011, d}). Values above 999 are shown as 999.
// The module converts continuously: after each result (valid pulses for one
// cycle and ascii updates) it reloads value and starts again, so a result
// takes value+2 cycles. ascii[0] is the most significant digit.
module bin2ascii #(
  parameter int unsigned DIGITS = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] value,
  output logic [7:0] ascii [DIGITS],
  output logic       valid
);
  localparam int unsigned MAXV = 10 ** DIGITS - 1;

  logic [9:0] count;
  logic [3:0] bcd [DIGITS];
  logic       loaded;

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      loaded <= 1'b0;
      count  <= '0;
      for (int d = 0; d < DIGITS; d++) begin
        bcd[d]   <= '0;
        ascii[d] <= 8'h30;
      end
    end else if (!loaded) begin
      count  <= (value > 10'(MAXV)) ? 10'(MAXV) : value;
      loaded <= 1'b1;
      for (int d = 0; d < DIGITS; d++) bcd[d] <= '0;
    end else if (count != 10'd0) begin
      count <= count - 1'b1;
      // bcd[DIGITS-1] is the units digit
      begin
        logic carry;
        carry = 1'b1;
        for (int d = DIGITS - 1; d >= 0; d--) begin
          if (carry) begin
            if (bcd[d] == 4'd9) bcd[d] <= 4'd0;
            else begin
              bcd[d] <= bcd[d] + 1'b1;
              carry = 1'b0;
            end
          end
        end
      end
    end else begin
      for (int d = 0; d < DIGITS; d++) ascii[d] <= {4'b0011, bcd[d]};
      valid  <= 1'b1;
      loaded <= 1'b0;
    end
  end
endmodule
