// bpf_65mhz: full-rate conditioning of one channel's reconstructed waveform
// before down-sampling: IIR low-pass (SHIFT 6, removes the reconstruction
// saw-tooth), IIR high-pass (SHIFT 10, blocks DC) and the triangle FIR as
// anti-alias filter. The FIR result is divided by 32 (bits [20:5]) to return
// to 16 bits. Each IIR stage has a gain of two; the chain runs every clock.
module bpf_65mhz (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [15:0] din,
  output logic signed [15:0] dout
);
  logic signed [15:0] lp, hp;
  logic signed [20:0] fir;

  iir_lpf #(.SHIFT(6))  u_lpf (.clk(clk), .rst(rst), .en(1'b1), .din(din), .dout(lp));
  iir_hpf #(.SHIFT(10)) u_hpf (.clk(clk), .rst(rst), .en(1'b1), .din(lp),  .dout(hp));
  tri_fir               u_fir (.clk(clk), .rst(rst), .en(1'b1), .din(hp),  .dout(fir));

  assign dout = fir[20:5];
endmodule
