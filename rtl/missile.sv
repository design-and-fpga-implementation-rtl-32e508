// missile: the ship's missile.
//
// One missile is in flight at a time. On a frame_tick with fire held and no
// missile in flight it is launched from the middle of the ship's top edge.
// Each later frame_tick moves it MISSILE_STEP pixels up; it disappears when
// it would leave the top of the screen, or at once when hit reports that it
// struck an alien. missile_pix tells whether the scanned pixel lies in the
// MISSILE_W x MISSILE_H rectangle. Keeping MISSILE_H no smaller than
// MISSILE_STEP makes the rectangles of successive frames touch, so the
// per-pixel collision test cannot step over an alien. Sizes, speed and the
// repeat-fire rule are this design's choices.
module missile
  import space_shoot_pkg::*;
#(
  parameter int unsigned MISSILE_STEP = 8,
  parameter int unsigned MISSILE_H    = 8,
  parameter int unsigned SHIP_Y       = 440
) (
  input  logic       clk,
  input  logic       not_reset,
  input  logic       frame_tick,
  input  logic       fire,
  input  logic       hit,
  input  logic [9:0] ship_x,
  input  logic [9:0] px_x,
  input  logic [9:0] px_y,
  output logic       missile_pix,
  output logic       active,
  output logic [9:0] missile_x,
  output logic [9:0] missile_y,
  output logic       launched
);

  always_ff @(posedge clk) begin
    launched <= 1'b0;
    if (!not_reset) begin
      active    <= 1'b0;
      missile_x <= '0;
      missile_y <= '0;
    end else if (hit) begin
      active <= 1'b0;
    end else if (frame_tick) begin
      if (active) begin
        if (missile_y < 10'(MISSILE_STEP)) active <= 1'b0;
        else missile_y <= missile_y - 10'(MISSILE_STEP);
      end else if (fire) begin
        active    <= 1'b1;
        launched  <= 1'b1;
        missile_x <= ship_x + 10'(SHIP_W / 2 - MISSILE_W / 2);
        missile_y <= 10'(SHIP_Y - MISSILE_H);
      end
    end
  end

  assign missile_pix = active &&
                       (px_x >= missile_x) && (11'(px_x) < 11'(missile_x) + 11'(MISSILE_W)) &&
                       (px_y >= missile_y) && (11'(px_y) < 11'(missile_y) + 11'(MISSILE_H));

endmodule
