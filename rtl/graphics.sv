// graphics: game logic and picture generation of the Space Shoot game.
//
// This is the graphics processor of the game. It follows the VGA scan: for
// every pixel (px_x, px_y) it decides the colour from the score text, the
// missile, the ship, three rows of aliens and the background held in the
// frame buffer, and it also runs the game.
//
// Game. Once per frame, at the start of vertical blanking (frame_tick), the
// ship moves while nes_left or nes_right is held and the missile is
// launched (nes_a) or moves up. Every MOVE_FRAMES frames the alien
// formation takes one step (alien_motion). Collision is tested per pixel
// during the scan: when the missile and a live alien cover the same pixel,
// that alien dies and the missile is removed. Each kill scores 2; when all
// three rows are empty the level rises and the wave restarts.
//
// Picture. The frame buffer is read at (px_y/2)*320 + px_x/2, so each of
// its 320x240 pixels covers a 2x2 block of the 640x480 screen. Its word
// arrives one clock after the address, on the second clock of the pixel,
// where p_tick is high; rgb_stream is registered on that clock, so it lags
// the pixel coordinates (and hsync/vsync) by one pixel.
module graphics
  import space_shoot_pkg::*;
#(
  parameter int unsigned N_ALIENS     = 8,
  parameter int unsigned PITCH        = 48,
  parameter int unsigned ROW_PITCH    = 48,
  parameter int unsigned MOVE_FRAMES  = 30,
  parameter int unsigned SHIP_STEP    = 4,
  parameter int unsigned SHIP_Y       = 440,
  parameter int unsigned MISSILE_STEP = 8,
  parameter int unsigned MISSILE_H    = 8,
  parameter int unsigned ALIEN_X0     = 192,
  parameter int unsigned ALIEN_Y0     = 98
) (
  input  logic             clk,
  input  logic             reset_n,
  input  logic [9:0]       px_x,
  input  logic [9:0]       px_y,
  input  logic             p_tick,
  input  logic             video_on,
  input  logic             nes_left,
  input  logic             nes_right,
  input  logic             nes_a,
  // frame buffer access from outside
  input  logic             fb_we,
  input  logic [FB_AW-1:0] fb_waddr,
  input  rgb_t             fb_wdata,
  input  logic             fb_re,
  input  logic [FB_AW-1:0] fb_raddr,
  output rgb_t             fb_rdata,
  output rgb_t             rgb_stream,
  output logic [9:0]       score,
  output logic [7:0]       level,
  output logic             frame_tick,
  output logic             destruction,
  output logic             restart
);

  localparam int unsigned A_WIDTH = N_ALIENS * PITCH - (PITCH - ALIEN_SIZE);
  localparam int unsigned MFW     = (MOVE_FRAMES > 1) ? $clog2(MOVE_FRAMES) : 1;

  // ---------------------------------------------------------------- ticks
  logic [MFW-1:0] frame_cnt;
  logic           move_step;

  assign frame_tick = p_tick && (px_x == '0) && (px_y == 10'(SCREEN_H));

  always_ff @(posedge clk) begin
    move_step <= 1'b0;
    if (!reset_n) begin
      frame_cnt <= '0;
    end else if (frame_tick) begin
      if (frame_cnt == MFW'(MOVE_FRAMES - 1)) begin
        frame_cnt <= '0;
        move_step <= 1'b1;
      end else begin
        frame_cnt <= frame_cnt + 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- ship and missile
  logic [9:0] ship_x, missile_x, missile_y;
  logic       ship_pix, missile_pix, missile_active, missile_launched;

  spaceship #(.SHIP_STEP(SHIP_STEP), .SHIP_Y(SHIP_Y)) u_ship (
    .clk, .not_reset (reset_n), .frame_tick,
    .move_left (nes_left), .move_right (nes_right),
    .px_x, .px_y, .ship_x, .ship_pix
  );

  missile #(.MISSILE_STEP(MISSILE_STEP), .MISSILE_H(MISSILE_H), .SHIP_Y(SHIP_Y)) u_missile (
    .clk, .not_reset (reset_n), .frame_tick,
    .fire (nes_a), .hit (destruction), .ship_x,
    .px_x, .px_y, .missile_pix, .active (missile_active),
    .missile_x, .missile_y, .launched (missile_launched)
  );

  // ---------------------------------------------------------------- aliens
  logic [9:0] master_x, master_y;
  logic       moving_right, turned;
  logic [2:0] alien_pix_g, hit_g, defeated_g;

  alien_motion #(.A_WIDTH(A_WIDTH), .X0(ALIEN_X0), .Y0(ALIEN_Y0)) u_motion (
    .clk, .not_reset (reset_n), .step (move_step), .restart,
    .master_x, .master_y, .moving_right, .turned
  );

  for (genvar g = 0; g < 3; g++) begin : g_row
    logic [N_ALIENS-1:0] alive;
    alien_group #(.N_ALIENS(N_ALIENS), .PITCH(PITCH), .ROW_OFFSET(g * ROW_PITCH)) u_group (
      .clk, .not_reset (reset_n),
      .origin_x (master_x), .origin_y (master_y),
      .px_x, .px_y, .p_tick, .missile_pix, .restart,
      .alien_pix (alien_pix_g[g]), .hit (hit_g[g]), .defeated (defeated_g[g]), .alive
    );
  end

  assign destruction = |hit_g;

  // ---------------------------------------------------------------- score, level, text
  logic [15:0] score_bcd;
  logic [11:0] level_bcd;
  logic        text_pix;

  game_score #(.SCORE_W(10), .LEVEL_W(8)) u_score (
    .clk, .not_reset (reset_n), .destruction, .defeated (defeated_g),
    .restart, .score, .level
  );

  bin2bcd #(.W(10), .DIGITS(4)) u_score_bcd (.bin (score), .bcd (score_bcd));
  bin2bcd #(.W(8),  .DIGITS(3)) u_level_bcd (.bin (level), .bcd (level_bcd));

  text_display u_text (.px_x, .px_y, .score_bcd, .level_bcd, .text_pix);

  // ---------------------------------------------------------------- background and output
  logic [FB_AW-1:0] scan_addr;
  rgb_t bg_rgb, pix_rgb;

  assign scan_addr = FB_AW'(px_y[9:1]) * FB_AW'(FB_W) + FB_AW'(px_x[9:1]);

  frame_buffer u_fb (
    .clk,
    .we (fb_we), .waddr (fb_waddr), .wdata (fb_wdata),
    .re_a (video_on), .raddr_a (scan_addr), .rdata_a (bg_rgb),
    .re_b (fb_re), .raddr_b (fb_raddr), .rdata_b (fb_rdata)
  );

  pixel_mux u_mux (
    .video_on, .text_pix, .missile_pix, .ship_pix,
    .alien_pix (|alien_pix_g), .bg_rgb, .rgb (pix_rgb)
  );

  always_ff @(posedge clk) begin
    if (!reset_n)    rgb_stream <= COL_BLACK;
    else if (p_tick) rgb_stream <= pix_rgb;
  end

endmodule
