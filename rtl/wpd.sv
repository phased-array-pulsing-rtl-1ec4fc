// wpd: single-channel wave package detector.
// Looks through the echo bits of one channel, one row per 'valid', for a
// package: a real echo shows up as a run of 12-sample pulses repeating with
// the 25-sample period of 40 kHz. Five states:
//   CATCH_RISE   wait for a 0->1 transition; remember its time
//   VERIFY_RISE  over HALF_PERIOD rows from the edge, more than POS_TH ones
//                confirm it (t1 = edge time), otherwise back to CATCH_RISE
//                (this rejects narrow glitches)
//   CATCH_FALL   wait for a 0; remember its time
//   VERIFY_FALL  over PERIOD rows from that 0, fewer than NEG_TH ones confirm
//                the package has ended (t2 = time of that 0); otherwise it
//                was only the gap between two pulses: back to CATCH_FALL
//   DONE         hold t1/t2 until the next start
// start (one cycle) begins a new search from the current row; the previous
// bit is taken as 1 so a package already in progress is not caught mid-way.
// 'rising' tells the multi-channel logic that this channel has its edge.
// The state structure is the document's; the window lengths and thresholds
// are the listed values.
module wpd #(
  parameter int unsigned HALF_PERIOD = 12,
  parameter int unsigned PERIOD      = 25,
  parameter int unsigned POS_TH      = 9,
  parameter int unsigned NEG_TH      = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        valid,
  input  logic        bit_in,
  input  logic [15:0] t_in,
  output logic [15:0] t1,
  output logic [15:0] t2,
  output logic        rising,
  output logic        done
);
  typedef enum logic [2:0] {S_IDLE, S_CATCH_RISE, S_VERIFY_RISE, S_CATCH_FALL, S_VERIFY_FALL, S_DONE} state_e;
  state_e state;
  logic prev;
  logic [4:0] cnt, sum, sum_next;
  logic [15:0] t_maybe;

  assign sum_next = sum + 5'(bit_in);
  assign done   = (state == S_DONE);
  assign rising = (state == S_CATCH_FALL) || (state == S_VERIFY_FALL) || (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      prev  <= 1'b1;
      cnt   <= '0;
      sum   <= '0;
      t1    <= '0;
      t2    <= '0;
      t_maybe <= '0;
    end else if (start) begin
      state <= S_CATCH_RISE;
      prev  <= 1'b1;
    end else if (valid) begin
      prev <= bit_in;
      unique case (state)
        S_CATCH_RISE:
          if (bit_in && !prev) begin
            t_maybe <= t_in;
            cnt     <= 5'd1;
            sum     <= 5'd1;
            state   <= S_VERIFY_RISE;
          end
        S_VERIFY_RISE: begin
          cnt <= cnt + 1'b1;
          sum <= sum_next;
          if (cnt + 1'b1 == 5'(HALF_PERIOD)) begin
            if (sum_next > 5'(POS_TH)) begin
              t1    <= t_maybe;
              state <= S_CATCH_FALL;
            end else begin
              state <= S_CATCH_RISE;
            end
          end
        end
        S_CATCH_FALL:
          if (!bit_in) begin
            t_maybe <= t_in;
            cnt     <= 5'd1;
            sum     <= 5'd0;
            state   <= S_VERIFY_FALL;
          end
        S_VERIFY_FALL: begin
          cnt <= cnt + 1'b1;
          sum <= sum_next;
          if (cnt + 1'b1 == 5'(PERIOD)) begin
            if (sum_next < 5'(NEG_TH)) begin
              t2    <= t_maybe;
              state <= S_DONE;
            end else begin
              state <= S_CATCH_FALL;
            end
          end
        end
        default: ;
      endcase
    end
  end
endmodule
