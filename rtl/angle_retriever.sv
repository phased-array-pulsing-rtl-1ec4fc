// angle_retriever: direction of the current object.
// With the arrival-time difference dt (samples) across the array of length
// D, the far-field estimate is cos(theta) = v*dt/D. In Q1.9 fixed point
// (512 = 1.0) this is cos = (A2 * dt) >>> 9, A2 = 446, saturated to +-511.
// The estimate then passes through the calibration table (cal_lut), indexed
// by coarse cos and range, which corrects near-field error.
// Handshake: start (one cycle) -> done pulse 4 cycles later, cos_theta valid.
module angle_retriever #(
  parameter int A2 = 446
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic signed [11:0] dt,
  input  logic [9:0]         r,
  output logic signed [9:0]  cos_theta,
  output logic               done,
  input  logic               cal_we,
  input  logic [7:0]         cal_waddr,
  input  logic signed [7:0]  cal_wdata
);
  logic signed [23:0] prod;
  logic signed [9:0]  cos_est;
  logic signed [23:0] scaled;
  logic [2:0] stage;

  assign scaled = prod >>> 9;

  cal_lut u_lut (.clk(clk), .cos_in(cos_est), .r(r), .cos_out(cos_theta),
                 .we(cal_we), .waddr(cal_waddr), .wdata(cal_wdata));

  always_ff @(posedge clk) begin
    if (rst) begin
      stage   <= '0;
      done    <= 1'b0;
      prod    <= '0;
      cos_est <= '0;
    end else begin
      done <= 1'b0;
      unique case (stage)
        3'd0: if (start) begin
                prod  <= 24'(A2) * 24'(dt);
                stage <= 3'd1;
              end
        3'd1: begin
                cos_est <= (scaled > 24'sd511) ? 10'sd511 : (scaled < -24'sd511) ? -10'sd511 : 10'(scaled);
                stage   <= 3'd2;
              end
        3'd2: stage <= 3'd3;          // table lookup
        3'd3: begin
                done  <= 1'b1;
                stage <= 3'd0;
              end
        default: stage <= 3'd0;
      endcase
    end
  end
endmodule
