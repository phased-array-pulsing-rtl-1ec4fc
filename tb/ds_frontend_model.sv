// ds_frontend_model: behavioural stand-in for one analog delta-sigma front
// end (amplifier, difference integrator, comparator) for test benches.
// Each clock the integrator adds GAIN * (ain - fb), with fb = +1 when the
// feedback bit is high and -1 when low, and comp is high while the
// integrator is above zero, so comp's duty cycle follows (1 + ain) / 2.
// ain is a real in -1..1 given by the bench. Only a model: not hardware.
module ds_frontend_model #(
  parameter real GAIN = 0.05
) (
  input  logic clk,
  input  real  ain,
  input  logic fb,
  output logic comp
);
  real integ = 0.0;
  always @(posedge clk) begin
    integ <= integ + GAIN * (ain - (fb ? 1.0 : -1.0));
    comp  <= (integ > 0.0);
  end
endmodule
