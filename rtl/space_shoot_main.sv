// space_shoot_main: top level of the Space Shoot game.
//
// A PS/2 mouse steers a ship along the bottom of a 640x480 VGA picture and
// shoots at three rows of aliens that sweep from side to side. The left
// mouse button moves the ship left, the right one moves it right and the
// middle one fires. The design has four parts, wired as in the original:
//   io_ps2_mouse  enables the mouse and decodes its three-byte packets;
//   graphics      runs the game and produces the colour of each pixel;
//   vga_sync      makes hsync, vsync and the pixel coordinates;
//   rgb_out_reg   the falling-edge output flip-flop (fd_1) on rgb.
// Everything runs from the 50 MHz board clock; not_reset is a synchronous,
// active-low reset. The PS/2 lines are open drain: ps3_clk_in/ps3_dat_in
// are the lines at the pins, ps3_clk_out/ps3_dat_out = 0 pull them low.
// write/wr_addr/wr_data and read/rd_addr/rd_data reach the frame buffer
// that holds the 320x240 background. rgb lags hsync/vsync by one pixel
// (40 ns) plus half a clock, well inside the porches of the VGA line.
// The parameters size the game (aliens per row, speeds, start position) and
// the mouse start-up; their defaults are the configuration of the game.
module space_shoot_main
  import space_shoot_pkg::*;
#(
  parameter int unsigned N_ALIENS       = 8,
  parameter int unsigned MOVE_FRAMES    = 30,
  parameter int unsigned SHIP_STEP      = 4,
  parameter int unsigned MISSILE_STEP   = 8,
  parameter int unsigned MISSILE_H      = 8,
  parameter int unsigned ALIEN_X0       = 192,
  parameter int unsigned INHIBIT_CYCLES = 5000
) (
  input  logic             clk,
  input  logic             not_reset,
  input  logic             ps3_clk_in,
  input  logic             ps3_dat_in,
  output logic             ps3_clk_out,
  output logic             ps3_dat_out,
  input  logic             write,
  input  logic [FB_AW-1:0] wr_addr,
  input  rgb_t             wr_data,
  input  logic             read,
  input  logic [FB_AW-1:0] rd_addr,
  output rgb_t             rd_data,
  output logic             hsync,
  output logic             vsync,
  output rgb_t             rgb
);

  logic [8:0] deltaX, deltaY, deltaZ;
  logic       leftButton, middleButton, rightButton, mousePresent, trigger;
  logic [9:0] px_x, px_y;
  logic       p_tick, video_on;
  rgb_t       rgb_stream;
  logic [9:0] score;
  logic [7:0] level;
  logic       frame_tick, destruction, restart;

  io_ps2_mouse #(.INHIBIT_CYCLES(INHIBIT_CYCLES)) u_mouse (
    .clk, .not_reset,
    .ps2_clk_in (ps3_clk_in), .ps2_dat_in (ps3_dat_in),
    .ps2_clk_out (ps3_clk_out), .ps2_dat_out (ps3_dat_out),
    .deltaX, .deltaY, .deltaZ,
    .leftButton, .middleButton, .rightButton, .mousePresent, .trigger
  );

  graphics #(
    .N_ALIENS (N_ALIENS), .MOVE_FRAMES (MOVE_FRAMES), .SHIP_STEP (SHIP_STEP),
    .MISSILE_STEP (MISSILE_STEP), .MISSILE_H (MISSILE_H), .ALIEN_X0 (ALIEN_X0)
  ) u_graphics (
    .clk, .reset_n (not_reset),
    .px_x, .px_y, .p_tick, .video_on,
    .nes_left (leftButton), .nes_right (rightButton), .nes_a (middleButton),
    .fb_we (write), .fb_waddr (wr_addr), .fb_wdata (wr_data),
    .fb_re (read), .fb_raddr (rd_addr), .fb_rdata (rd_data),
    .rgb_stream, .score, .level, .frame_tick, .destruction, .restart
  );

  vga_sync u_vga (
    .clk, .not_reset,
    .pixel_x (px_x), .pixel_y (px_y),
    .hsync, .vsync, .p_tick, .video_on
  );

  rgb_out_reg #(.W(3)) fd_1 (.clk, .d (rgb_stream), .q (rgb));

endmodule
