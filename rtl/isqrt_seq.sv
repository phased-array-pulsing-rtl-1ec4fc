// isqrt_seq: integer square root, one result bit per clock.
// root = floor(sqrt(radicand)) for a W-bit radicand (W even), computed by the
// digit-by-digit method in W/2 cycles after start; done pulses for one cycle.
module isqrt_seq #(
  parameter int unsigned W = 20
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [W-1:0]   radicand,
  output logic [W/2-1:0] root,
  output logic           done
);
  localparam int unsigned CW = $clog2(W/2 + 1);
  logic [W-1:0]   x;
  localparam int unsigned TW = W/2 + 4;
  logic [TW-3:0]  rem;
  logic [W/2-1:0] q;
  logic [CW-1:0]  left;
  logic [TW-1:0]  trial, cand;

  assign trial = {rem, x[W-1:W-2]};
  assign cand  = TW'({q, 2'b01});

  always_ff @(posedge clk) begin
    if (rst) begin
      left <= '0;
      done <= 1'b0;
      x <= '0; rem <= '0; q <= '0; root <= '0;
    end else if (start) begin
      x    <= radicand;
      rem  <= '0;
      q    <= '0;
      left <= CW'(W/2);
      done <= 1'b0;
    end else if (left != '0) begin
      x <= {x[W-3:0], 2'b00};
      if (trial >= cand) begin
        rem <= (TW-2)'(trial - cand);
        q   <= {q[W/2-2:0], 1'b1};
      end else begin
        rem <= (TW-2)'(trial);
        q   <= {q[W/2-2:0], 1'b0};
      end
      left <= left - 1'b1;
      if (left == CW'(1)) begin
        done <= 1'b1;
        root <= (trial >= cand) ? {q[W/2-2:0], 1'b1} : {q[W/2-2:0], 1'b0};
      end
    end else begin
      done <= 1'b0;
    end
  end
endmodule
