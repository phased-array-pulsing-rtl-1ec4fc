// wpd12: twelve-channel wave package detector.
// Walks the echo buffer from the current read pointer, one row per clock, and
// hands each row (with the address it came from) to twelve wpd instances,
// one per channel bit. When every channel has found a package, 'done' pulses
// and the pointer stops, so the next start continues the scan after this
// package. When the pointer reaches MAX_ADDR, 'done' and 'finished' are
// raised: there are no more packages in this frame. restart rewinds the
// pointer to 0 for a new frame and clears 'finished'.
// The buffer read has one cycle of latency, which the row/address pipeline
// register accounts for.
module wpd12 #(
  parameter int unsigned NUM_CH   = 12,
  parameter int unsigned AW       = 15,
  parameter int unsigned MAX_ADDR = 32760
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              restart,
  input  logic              start,
  output logic [AW-1:0]     raddr,
  input  logic [NUM_CH-1:0] rdata,
  output logic [15:0]       t1 [NUM_CH],
  output logic [15:0]       t2 [NUM_CH],
  output logic              done,
  output logic              finished
);
  logic [AW-1:0] ptr, ptr_d;
  logic          scanning, issued;
  logic [NUM_CH-1:0] ch_done, ch_rising;

  assign raddr = ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr      <= '0;
      ptr_d    <= '0;
      scanning <= 1'b0;
      issued   <= 1'b0;
      done     <= 1'b0;
      finished <= 1'b0;
    end else begin
      done   <= 1'b0;
      issued <= 1'b0;
      ptr_d  <= ptr;
      if (restart) begin
        ptr      <= '0;
        finished <= 1'b0;
        scanning <= 1'b0;
      end else if (start) begin
        scanning <= 1'b1;
      end else if (scanning) begin
        if (&ch_done) begin
          scanning <= 1'b0;
          done     <= 1'b1;
        end else if (ptr >= AW'(MAX_ADDR)) begin
          scanning <= 1'b0;
          done     <= 1'b1;
          finished <= 1'b1;
        end else begin
          ptr    <= ptr + 1'b1;
          issued <= 1'b1;
        end
      end
    end
  end

  for (genvar c = 0; c < NUM_CH; c++) begin : g_wpd
    wpd u_wpd (.clk(clk), .rst(rst), .start(start), .valid(issued), .bit_in(rdata[c]),
               .t_in(16'(ptr_d)), .t1(t1[c]), .t2(t2[c]), .rising(ch_rising[c]), .done(ch_done[c]));
  end
endmodule
