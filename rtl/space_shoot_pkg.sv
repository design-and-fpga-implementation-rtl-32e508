// space_shoot_pkg: types and constants shared by the Space Shoot game.
// Screen geometry is the 640x480 VGA picture; colours are 3-bit RGB
// (bit 2 red, bit 1 green, bit 0 blue), eight colours in all, matching the
// 3-bit pixels of the frame buffer. Colour choices are this design's own.
package space_shoot_pkg;

  typedef logic [2:0] rgb_t;

  localparam int unsigned SCREEN_W = 640;
  localparam int unsigned SCREEN_H = 480;

  // Frame buffer: 320x240 pixels of 3 bits, each shown as a 2x2 block.
  localparam int unsigned FB_W     = 320;
  localparam int unsigned FB_H     = 240;
  localparam int unsigned FB_DEPTH = FB_W * FB_H;
  localparam int unsigned FB_AW    = $clog2(FB_DEPTH);

  // Sprite sizes.
  localparam int unsigned ALIEN_SIZE = 32;   // alien image is a 32x32 array
  localparam int unsigned SHIP_W     = 32;
  localparam int unsigned SHIP_H     = 16;
  localparam int unsigned MISSILE_W  = 4;

  localparam rgb_t COL_BLACK   = 3'b000;
  localparam rgb_t COL_RED     = 3'b100;
  localparam rgb_t COL_YELLOW  = 3'b110;
  localparam rgb_t COL_WHITE   = 3'b111;
  localparam rgb_t COL_CYAN    = 3'b011;
  localparam rgb_t COL_GREEN   = 3'b010;

  localparam rgb_t COL_TEXT    = COL_WHITE;
  localparam rgb_t COL_MISSILE = COL_CYAN;
  localparam rgb_t COL_SHIP    = COL_GREEN;
  localparam rgb_t COL_ALIEN   = COL_YELLOW;
  localparam rgb_t COL_BG      = COL_RED;

  // PS/2 commands used by the mouse host.
  localparam logic [7:0] PS2_CMD_ENABLE = 8'hF4;  // enable data reporting
  localparam logic [7:0] PS2_ACK       = 8'hFA;

endpackage
