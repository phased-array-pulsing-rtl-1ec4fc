// alarm_gen: two-tone warning sound while an object is close.
// While alarm_on is high the output is a square wave that toggles every
// HALF_A cycles for TOGGLES toggles, then every HALF_B cycles for TOGGLES
// toggles, and so on. At 64.8 MHz this is 400 Hz and 700 Hz, switching
// every 0.75 s / 0.43 s. When alarm_on is low the output is low and the
// sequence restarts from tone A. From the document: 400/700 Hz alternating
// tones; the toggle count per tone follows the siren's scheme.
module alarm_gen #(
  parameter int unsigned HALF_A  = 81000,
  parameter int unsigned HALF_B  = 46286,
  parameter int unsigned TOGGLES = 300
) (
  input  logic clk,
  input  logic rst,
  input  logic alarm_on,
  output logic audio
);
  localparam int unsigned CW = $clog2(HALF_A > HALF_B ? HALF_A : HALF_B);
  localparam int unsigned TW = $clog2(TOGGLES + 1);

  logic          choose_b;
  logic [CW-1:0] cnt;
  logic [TW-1:0] toggles;
  logic [CW-1:0] half_m1;

  assign half_m1 = choose_b ? CW'(HALF_B - 1) : CW'(HALF_A - 1);

  always_ff @(posedge clk) begin
    if (rst || !alarm_on) begin
      choose_b <= 1'b0;
      cnt      <= '0;
      toggles  <= '0;
      audio    <= 1'b0;
    end else if (cnt == half_m1) begin
      cnt   <= '0;
      audio <= !audio;
      if (toggles == TW'(TOGGLES - 1)) begin
        toggles  <= '0;
        choose_b <= !choose_b;
      end else begin
        toggles <= toggles + 1'b1;
      end
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
