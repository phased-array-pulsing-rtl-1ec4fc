// sonar_pkg: constants and types shared by the sonar blocks.
// The system runs from one 64.8 MHz clock. Twelve receiver channels each
// contribute one echo bit per ~1 us sample row; a row is stored at an address
// equal to the number of samples since the transmit pulse. Screen geometry is
// 1024x768 with the sonar origin at the centre (512, 384).
package sonar_pkg;
  localparam int unsigned CLK_HZ   = 64_800_000;
  localparam int unsigned NUM_CH   = 12;
  localparam int unsigned BUF_AW   = 15;   // 32K rows
  localparam int unsigned NUM_OBJ  = 10;
  localparam int unsigned SCREEN_W = 1024;
  localparam int unsigned SCREEN_H = 768;
  localparam int unsigned CX       = 512;
  localparam int unsigned CY       = 384;

  typedef logic [23:0] rgb_t;
  typedef logic [NUM_CH-1:0] row_t;

  localparam rgb_t BLACK  = 24'h000000;
  localparam rgb_t GREEN  = 24'h00FF00;
  localparam rgb_t YELLOW = 24'hFFFF00;
  localparam rgb_t RED    = 24'hFF0000;

  // User interface modes chosen from the menu.
  typedef enum logic [2:0] {
    MODE_NORMAL    = 3'd0,
    MODE_CALIBRATE = 3'd1,
    MODE_HIDE_MENU = 3'd2,
    MODE_HIDE_ALL  = 3'd3
  } ui_mode_e;
endpackage
