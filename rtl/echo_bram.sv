// echo_bram: the echo buffer between acquisition and signal analysis.
// Simple dual-port RAM of 2^AW rows of DW bits (12 x 32K): one port writes a
// row of echo bits per microsecond, the other is read by the signal analysis.
// Reads are synchronous: rdata holds the row at raddr one cycle later.
// A row written and read in the same cycle reads the old contents.
module echo_bram #(
  parameter int unsigned DW = 12,
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
