// gui_menu: mode menu on the right of the screen.
// Three items are stacked in a box at x >= X0 between Y_TOP and
// Y_TOP + 3*ITEM_H: calibration, hide menu, hide all. A left click with the
// mouse inside an item (mx >= X0 + 5, my in that item's band) selects its
// mode (1, 2, 3); a right click anywhere returns to normal mode (0).
// Drawing (when show is high): a white frame round the box and between the
// items, the selected item filled grey, the item under the mouse filled
// blue. pixel is 2 cycles after hcount/vcount (region decode registered,
// then colour registered). The item labels belong to a character generator
// and are not drawn here.
// From the document: the three items, left-click select, right-click
// return, the box position (X0 = 920, items from y = 230). Colours and
// item height are this design's.
module gui_menu
  import sonar_pkg::*;
#(
  parameter int unsigned X0     = 920,
  parameter int unsigned X1     = 1020,
  parameter int unsigned Y_TOP  = 230,
  parameter int unsigned ITEM_H = 100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [11:0] mx,
  input  logic [11:0] my,
  input  logic        left_click,
  input  logic        right_click,
  input  logic        show,
  output ui_mode_e    mode,
  output rgb_t        pixel
);
  localparam rgb_t WHITE = 24'hFFFFFF;
  localparam rgb_t GREY  = 24'h404040;
  localparam rgb_t BLUE  = 24'h0000A0;

  // which item (1..3) a point is in, 0 for none
  function automatic logic [1:0] item_at(input logic [11:0] px, input logic [11:0] py,
                                         input logic [11:0] xmin);
    if (px < xmin || px >= 12'(X1) || py < 12'(Y_TOP + 5) ||
        py >= 12'(Y_TOP + 3 * ITEM_H + 5))
      return 2'd0;
    else if (py < 12'(Y_TOP + ITEM_H + 5)) return 2'd1;
    else if (py < 12'(Y_TOP + 2 * ITEM_H + 5)) return 2'd2;
    else return 2'd3;
  endfunction

  logic [1:0] hover;
  assign hover = item_at(mx, my, 12'(X0 + 5));

  always_ff @(posedge clk) begin
    if (rst) mode <= MODE_NORMAL;
    else if (right_click) mode <= MODE_NORMAL;
    else if (left_click && hover != 2'd0) mode <= ui_mode_e'(hover);
  end

  // ---- drawing ----------------------------------------------------------------
  logic [11:0] hx, vy;
  logic        border_q, show_q;
  logic [1:0]  item_q;

  assign hx = 12'(hcount);
  assign vy = 12'(vcount);

  always_ff @(posedge clk) begin
    show_q   <= show;
    item_q   <= item_at(hx, vy, 12'(X0 + 2));
    border_q <= (hx >= 12'(X0) && hx < 12'(X1 + 2) && vy >= 12'(Y_TOP) &&
                 vy < 12'(Y_TOP + 3 * ITEM_H + 10)) &&
                (hx < 12'(X0 + 2) || hx >= 12'(X1) || vy < 12'(Y_TOP + 5) ||
                 vy >= 12'(Y_TOP + 3 * ITEM_H + 5) ||
                 (vy >= 12'(Y_TOP + ITEM_H + 3) && vy < 12'(Y_TOP + ITEM_H + 5)) ||
                 (vy >= 12'(Y_TOP + 2 * ITEM_H + 3) && vy < 12'(Y_TOP + 2 * ITEM_H + 5)));
    if (!show_q)                      pixel <= BLACK;
    else if (border_q)                pixel <= WHITE;
    else if (item_q != 2'd0 && item_q == hover) pixel <= BLUE;
    else if (item_q != 2'd0 && item_q == 2'(mode)) pixel <= GREY;
    else                              pixel <= BLACK;
  end
endmodule
