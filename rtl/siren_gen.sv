// siren_gen: short tone played when the sweep passes over an object.
// When sound_on is seen while idle, the output starts high and toggles
// every HALF_PERIOD cycles for TOGGLES toggles (at 64.8 MHz: 540 Hz tone,
// about 139 ms), then returns low and idle. A new sound_on during a tone is
// ignored. From the document: the 60,000-count half period and a tone of
// about 150 ms (150 toggles). The document quotes 1,030 Hz for this count;
// the count is kept, not the frequency.
module siren_gen #(
  parameter int unsigned HALF_PERIOD = 60000,
  parameter int unsigned TOGGLES     = 150
) (
  input  logic clk,
  input  logic rst,
  input  logic sound_on,
  output logic audio
);
  localparam int unsigned CW = $clog2(HALF_PERIOD);
  localparam int unsigned TW = $clog2(TOGGLES + 1);

  logic          active;
  logic [CW-1:0] cnt;
  logic [TW-1:0] toggles;

  always_ff @(posedge clk) begin
    if (rst) begin
      active  <= 1'b0;
      cnt     <= '0;
      toggles <= '0;
      audio   <= 1'b0;
    end else if (!active) begin
      audio <= 1'b0;
      if (sound_on) begin
        active  <= 1'b1;
        audio   <= 1'b1;
        cnt     <= '0;
        toggles <= '0;
      end
    end else if (cnt == CW'(HALF_PERIOD - 1)) begin
      cnt <= '0;
      if (toggles == TW'(TOGGLES - 1)) begin
        active <= 1'b0;
        audio  <= 1'b0;
      end else begin
        toggles <= toggles + 1'b1;
        audio   <= !audio;
      end
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
