// distance_retriever: range of the current object.
// The echo delay t is the mean leading-edge time (t1) of the four middle
// channels 4..7, in samples since the pulse. The range is
//   r = (a * t) >> A_SHIFT + b       (centimetres, saturated to 0..1023)
// with a and b from the parameter manager. With reprogram high the module
// instead calibrates: an object is known to stand at R_CAL cm, so
//   b_cal = R_CAL - (a * t) >> A_SHIFT
// is output with cal_valid, and r is computed with the new b.
// Timing: start (one cycle) -> r valid and done pulsing 5 cycles later.
module distance_retriever #(
  parameter int unsigned A_SHIFT = 14,
  parameter int unsigned R_CAL   = 300
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              reprogram,
  input  logic [15:0]       t1_mid [4],
  input  logic [9:0]        a,
  input  logic signed [9:0] b,
  output logic [9:0]        r,
  output logic signed [9:0] b_cal,
  output logic              cal_valid,
  output logic              done
);
  logic [17:0] tsum;
  logic [15:0] t;
  logic [25:0] prod;
  logic [11:0] rc;
  logic [2:0]  stage;
  logic        cal;
  logic signed [13:0] rsum, bdiff;
  logic signed [9:0]  b_use;

  assign tsum  = 18'(t1_mid[0]) + 18'(t1_mid[1]) + 18'(t1_mid[2]) + 18'(t1_mid[3]);
  assign bdiff = 14'(R_CAL) - $signed({2'b00, rc});
  assign b_use = cal ? b_cal : b;
  assign rsum  = $signed({2'b00, rc}) + 14'(b_use);

  always_ff @(posedge clk) begin
    if (rst) begin
      stage <= '0;
      done  <= 1'b0;
      cal_valid <= 1'b0;
      cal   <= 1'b0;
      t     <= '0;
      prod  <= '0;
      rc    <= '0;
      r     <= '0;
      b_cal <= '0;
    end else begin
      done      <= 1'b0;
      cal_valid <= 1'b0;
      if (start) begin
        t     <= tsum[17:2];
        cal   <= reprogram;
        stage <= 3'd1;
      end else if (stage == 3'd1) begin
        prod  <= a * t;
        stage <= 3'd2;
      end else if (stage == 3'd2) begin
        rc    <= 12'(prod >> A_SHIFT);
        stage <= 3'd3;
      end else if (stage == 3'd3) begin
        if (cal) begin
          b_cal     <= (bdiff > 14'sd511) ? 10'sd511 : (bdiff < -14'sd512) ? -10'sd512 : 10'(bdiff);
          cal_valid <= 1'b1;
        end
        stage <= 3'd4;
      end else if (stage == 3'd4) begin
        r     <= (rsum < 0) ? 10'd0 : (rsum > 14'sd1023) ? 10'd1023 : 10'(rsum);
        done  <= 1'b1;
        stage <= 3'd0;
      end
    end
  end
endmodule
