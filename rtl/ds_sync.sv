// ds_sync: synchroniser between the delta-sigma comparator and the logic.
// The comparator output changes asynchronously; it passes through STAGES
// registers. The last register drives both the feedback pin back to the
// analog difference integrator and the bit used by the reconstruction, so
// the integrator and the digital side always see the same bit.
// Latency: STAGES clock cycles. The number of stages is this design's choice.
module ds_sync #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic comp_in,
  output logic fb_out,
  output logic bit_out
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk)
    chain <= {chain[STAGES-2:0], comp_in};

  assign fb_out  = chain[STAGES-1];
  assign bit_out = chain[STAGES-1];
endmodule
