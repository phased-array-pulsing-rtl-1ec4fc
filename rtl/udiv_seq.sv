// udiv_seq: unsigned restoring divider, one quotient bit per clock.
// start loads dividend and divisor; NW cycles later done pulses for one cycle
// with quotient = dividend / divisor (all ones if divisor is zero).
// A start while busy restarts the division.
module udiv_seq #(
  parameter int unsigned NW = 28,
  parameter int unsigned DW = 18
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic [NW-1:0] quotient,
  output logic          done
);
  localparam int unsigned CW = $clog2(NW + 1);
  logic [NW-1:0] q;
  logic [DW:0]   rem;
  logic [DW-1:0] d;
  logic [CW-1:0] left;
  logic [DW:0]   trial;

  assign trial = {rem[DW-1:0], q[NW-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      left <= '0;
      done <= 1'b0;
      rem  <= '0;
      q    <= '0;
      d    <= '0;
      quotient <= '0;
    end else if (start) begin
      q    <= dividend;
      d    <= divisor;
      rem  <= '0;
      left <= CW'(NW);
      done <= 1'b0;
    end else if (left != '0) begin
      if (trial >= {1'b0, d}) begin
        rem <= trial - {1'b0, d};
        q   <= {q[NW-2:0], 1'b1};
      end else begin
        rem <= trial;
        q   <= {q[NW-2:0], 1'b0};
      end
      left <= left - 1'b1;
      done <= (left == CW'(1));
      if (left == CW'(1))
        quotient <= (trial >= {1'b0, d}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
    end else begin
      done <= 1'b0;
    end
  end
endmodule
