// spu_controller: sequencer of the signal processing unit.
// The work per object takes a data-dependent time, so the modules are
// chained by start/done handshakes (both one-cycle pulses):
//   IDLE --start--> WPD (restart the scan at row 0, then find a package)
//   WPD  --done & finished--> IDLE
//   WPD  --done & ~finished--> DR (distance) --done--> BR (phase)
//        --done--> AR (angle) --done--> CR (coordinates)
//   CR   --done--> count+1; WPD again while count < NUM_OBJ, else IDLE.
// Entering IDLE raises 'done' for one cycle and publishes total_obj.
// The echo-buffer read port belongs to the package detector in WPD and to
// the phase retriever otherwise (sel_br). A start while busy is ignored.
module spu_controller #(
  parameter int unsigned NUM_OBJ = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       done_wpd,
  input  logic       finished_wpd,
  input  logic       done_dr,
  input  logic       done_br,
  input  logic       done_ar,
  input  logic       done_cr,
  output logic       restart_wpd,
  output logic       start_wpd,
  output logic       start_dr,
  output logic       start_br,
  output logic       start_ar,
  output logic       start_cr,
  output logic       sel_br,
  output logic [3:0] obj_num,
  output logic [3:0] total_obj,
  output logic       done,
  output logic       busy
);
  typedef enum logic [2:0] {S_IDLE, S_WPD, S_DR, S_BR, S_AR, S_CR} state_e;
  state_e state;

  assign sel_br = (state != S_WPD);
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      obj_num <= '0;
      total_obj <= '0;
      {restart_wpd, start_wpd, start_dr, start_br, start_ar, start_cr, done} <= '0;
    end else begin
      {restart_wpd, start_wpd, start_dr, start_br, start_ar, start_cr, done} <= '0;
      unique case (state)
        S_IDLE: if (start) begin
          restart_wpd <= 1'b1;
          obj_num     <= '0;
          state       <= S_WPD;
          // start_wpd follows restart by one cycle (see S_WPD entry below)
        end
        S_WPD: begin
          if (restart_wpd) start_wpd <= 1'b1;
          else if (done_wpd) begin
            if (finished_wpd) begin
              state     <= S_IDLE;
              total_obj <= obj_num;
              done      <= 1'b1;
            end else begin
              state    <= S_DR;
              start_dr <= 1'b1;
            end
          end
        end
        S_DR: if (done_dr) begin state <= S_BR; start_br <= 1'b1; end
        S_BR: if (done_br) begin state <= S_AR; start_ar <= 1'b1; end
        S_AR: if (done_ar) begin state <= S_CR; start_cr <= 1'b1; end
        S_CR: if (done_cr) begin
          if (obj_num + 1'b1 < 4'(NUM_OBJ)) begin
            obj_num   <= obj_num + 1'b1;
            state     <= S_WPD;
            start_wpd <= 1'b1;
          end else begin
            obj_num   <= obj_num + 1'b1;
            total_obj <= obj_num + 1'b1;
            state     <= S_IDLE;
            done      <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
