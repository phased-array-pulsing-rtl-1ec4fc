// phase_retriever: unwrapped arrival-time difference across the array
// (called boundary retriever in its first form, which used leading edges).
// 1. Sampling: reads WINDOW rows starting at the middle of the package, the
//    mean of t1/t2 of the two end channels 0 and 11. For each channel the
//    offset of its first 0->1 transition in the window is its phase, in
//    samples modulo one 25-sample period (a channel with none gets 0).
// 2. Unwrapping by linear prediction: the side the wave reached first (the
//    end channel with the earlier t1) is the reference, because there the
//    difference between neighbours is known to be below half a period.
//    P(ref0) = phase(ref0); P(ref1) is phase(ref1) moved by whole periods to
//    within half a period of P(ref0); every further channel k is moved by
//    whole periods to within half a period of 2P(k-1) - P(k-2).
//    One correction step (+-PERIOD) or one accepted channel per clock.
// 3. dt = P(11) - P(0), signed, in samples.
// Handshake: start (one cycle) -> done pulse with dt valid; about
// WINDOW + 12 + the number of period corrections cycles.
// raddr must reach the buffer (the controller routes it there outside the
// detection state); data return one cycle after the address.
module phase_retriever #(
  parameter int unsigned NUM_CH = 12,
  parameter int unsigned AW     = 15,
  parameter int unsigned PERIOD = 25,
  parameter int unsigned WINDOW = 28
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [15:0]       t1_0,
  input  logic [15:0]       t2_0,
  input  logic [15:0]       t1_11,
  input  logic [15:0]       t2_11,
  output logic [AW-1:0]     raddr,
  input  logic [NUM_CH-1:0] rdata,
  output logic signed [11:0] dt,
  output logic              done
);
  localparam int HALF = PERIOD / 2;
  typedef enum logic [1:0] {S_IDLE, S_SAMPLE, S_LOAD, S_UNWRAP} state_e;
  state_e state;

  logic [5:0]  issue_cnt, recv_cnt;
  logic        recv_valid, warm;
  logic [NUM_CH-1:0] prev, found;
  logic signed [11:0] ph [NUM_CH];     // raw phase, then unwrapped phase
  logic        from_left;
  logic [3:0]  j;                       // position in the unwrap order
  logic signed [11:0] val, pred, p1, p2;
  logic [17:0] mid_sum;

  assign mid_sum = 18'(t1_0) + 18'(t2_0) + 18'(t1_11) + 18'(t2_11);

  // channel index of order position n
  function automatic logic [3:0] ch_of(input logic [3:0] n, input logic left);
    return left ? n : 4'(NUM_CH - 1) - n;
  endfunction

  assign p1   = ph[ch_of(j - 4'd1, from_left)];
  assign p2   = ph[ch_of(j - 4'd2, from_left)];
  assign pred = (j == 4'd1) ? p1 : (p1 <<< 1) - p2;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      raddr <= '0;
      dt    <= '0;
      issue_cnt  <= '0;
      recv_cnt   <= '0;
      recv_valid <= 1'b0;
      warm  <= 1'b0;
      prev  <= '0;
      found <= '0;
      from_left <= 1'b1;
      j     <= '0;
      val   <= '0;
      for (int c = 0; c < NUM_CH; c++) ph[c] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            raddr      <= AW'(mid_sum >> 2);
            issue_cnt  <= 6'd1;
            recv_cnt   <= '0;
            recv_valid <= 1'b1;
            warm       <= 1'b0;
            prev       <= '1;
            found      <= '0;
            from_left  <= (t1_0 <= t1_11);
            for (int c = 0; c < NUM_CH; c++) ph[c] <= '0;
            state      <= S_SAMPLE;
          end
        S_SAMPLE: begin
          if (issue_cnt < 6'(WINDOW)) begin
            raddr     <= raddr + 1'b1;
            issue_cnt <= issue_cnt + 1'b1;
          end
          warm <= 1'b1;    // first row arrives one cycle after its address
          if (recv_valid && warm) begin
            prev <= rdata;
            for (int c = 0; c < NUM_CH; c++)
              if (rdata[c] && !prev[c] && !found[c]) begin
                found[c] <= 1'b1;
                ph[c]    <= 12'(recv_cnt);
              end
            recv_cnt <= recv_cnt + 1'b1;
            if (recv_cnt == 6'(WINDOW - 1)) begin
              recv_valid <= 1'b0;
              state      <= S_LOAD;
            end
          end
        end
        S_LOAD: begin
          j     <= 4'd1;
          val   <= ph[ch_of(4'd1, from_left)];
          state <= S_UNWRAP;
        end
        S_UNWRAP: begin
          if (val - pred > 12'(HALF))       val <= val - 12'(PERIOD);
          else if (pred - val > 12'(HALF))  val <= val + 12'(PERIOD);
          else begin
            ph[ch_of(j, from_left)] <= val;
            if (j == 4'(NUM_CH - 1)) begin
              dt    <= from_left ? (val - ph[0]) : (ph[NUM_CH-1] - val);
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              j   <= j + 1'b1;
              val <= ph[ch_of(j + 4'd1, from_left)];
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
