// pulse_gen_40khz: transmit burst of NUM_CYCLES periods of 40 kHz.
// Two output pins each carry a 50% square wave of PERIOD clocks
// (64,800,000 / 40,000 = 1620). The waves are 120 degrees apart, so the
// bridged amplifier sees out_p - out_m step through -1,-1,0,+1,+1,0 in
// sixths of a period: a coarse staircase sine with no third harmonic.
// out_m is high for phase [0, PERIOD/2), out_p for [PERIOD/3, 5*PERIOD/6).
// A trigger (the 30 Hz frame enable) starts or restarts a burst; phase 0
// begins in the cycle after the trigger. Both pins are low when idle.
module pulse_gen_40khz #(
  parameter int unsigned PERIOD     = 1620,
  parameter int unsigned NUM_CYCLES = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic trigger,
  output logic out_p,
  output logic out_m,
  output logic busy
);
  localparam int unsigned PW = $clog2(PERIOD);
  localparam int unsigned CW = $clog2(NUM_CYCLES + 1);
  localparam int unsigned P_ON  = PERIOD / 3;
  localparam int unsigned P_OFF = (PERIOD * 5) / 6;
  localparam int unsigned M_OFF = PERIOD / 2;

  logic [PW-1:0] phase;
  logic [CW-1:0] remaining;

  assign busy = (remaining != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      remaining <= '0;
    end else if (trigger) begin
      phase     <= '0;
      remaining <= CW'(NUM_CYCLES);
    end else if (busy) begin
      if (phase == PW'(PERIOD - 1)) begin
        phase     <= '0;
        remaining <= remaining - 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  // Registered pin drive, one cycle behind the phase counter.
  always_ff @(posedge clk) begin
    if (rst || !busy || trigger) begin
      out_p <= 1'b0;
      out_m <= 1'b0;
    end else begin
      out_m <= (phase < PW'(M_OFF));
      out_p <= (phase >= PW'(P_ON)) && (phase < PW'(P_OFF));
    end
  end
endmodule
