// spaceship: the player's ship at the bottom of the screen.
//
// The ship only moves sideways. Once per frame (frame_tick) it moves
// SHIP_STEP pixels left while move_left is held, or right while move_right
// is held (nothing when both are), and it stops at the screen edges. It is
// drawn as a 32x16 triangle pointing up, with its top row at SHIP_Y;
// ship_pix tells whether the scanned pixel (px_x, px_y) is part of it.
// Step size, position and image are this design's choices; the original
// only says that the ship moves left or right.
module spaceship
  import space_shoot_pkg::*;
#(
  parameter int unsigned SHIP_STEP = 4,
  parameter int unsigned SHIP_Y    = 440,
  parameter int unsigned SHIP_X0   = 304
) (
  input  logic       clk,
  input  logic       not_reset,
  input  logic       frame_tick,
  input  logic       move_left,
  input  logic       move_right,
  input  logic [9:0] px_x,
  input  logic [9:0] px_y,
  output logic [9:0] ship_x,
  output logic       ship_pix
);

  localparam int unsigned X_MAX = SCREEN_W - SHIP_W;

  always_ff @(posedge clk) begin
    if (!not_reset) begin
      ship_x <= 10'(SHIP_X0);
    end else if (frame_tick) begin
      if (move_left && !move_right)
        ship_x <= (ship_x > 10'(SHIP_STEP)) ? ship_x - 10'(SHIP_STEP) : '0;
      else if (move_right && !move_left)
        ship_x <= (ship_x + 10'(SHIP_STEP) < 10'(X_MAX)) ? ship_x + 10'(SHIP_STEP) : 10'(X_MAX);
    end
  end

  logic signed [11:0] rel_x, rel_y;
  always_comb begin
    rel_x = $signed({2'b00, px_x}) - $signed({2'b00, ship_x});
    rel_y = $signed({2'b00, px_y}) - $signed(12'(SHIP_Y));
    // row r covers columns 15-r .. 16+r
    ship_pix = (rel_x >= 0) && (rel_x < $signed(12'(SHIP_W))) && (rel_y >= 0) && (rel_y < $signed(12'(SHIP_H))) &&
               (rel_x + rel_y >= $signed(12'(15))) && (rel_x <= rel_y + $signed(12'(16)));
  end

endmodule
