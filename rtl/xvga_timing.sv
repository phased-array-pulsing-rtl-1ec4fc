// xvga_timing: 1024x768 display timing at a 65 MHz-class pixel clock.
// hcount runs 0..H_TOTAL-1 across a line and vcount 0..V_TOTAL-1 down a
// frame (about 60 frames per second at 64.8 MHz). hsync and vsync are active
// low; blank is high outside the 1024x768 visible area. hcount/vcount are
// registered; the sync and blank outputs decode them in the same cycle. Standard XGA timing; the timing
// generator is this design's, the document only uses its signals.
module xvga_timing #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_SYNC0  = 1048,
  parameter int unsigned H_SYNC1  = 1184,
  parameter int unsigned H_TOTAL  = 1344,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_SYNC0  = 771,
  parameter int unsigned V_SYNC1  = 777,
  parameter int unsigned V_TOTAL  = 806
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 11'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? 10'd0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign hsync = !((hcount >= 11'(H_SYNC0)) && (hcount < 11'(H_SYNC1)));
  assign vsync = !((vcount >= 10'(V_SYNC0)) && (vcount < 10'(V_SYNC1)));
  assign blank = (hcount >= 11'(H_ACTIVE)) || (vcount >= 10'(V_ACTIVE));
endmodule
