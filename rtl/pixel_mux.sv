// pixel_mux: the multiplexing unit in front of the VGA output.
//
// The text display and the graphic display share one colour output. For
// each pixel the highest-priority layer that covers it gives the colour:
// text, then missile, then ship, then aliens, and otherwise the background
// colour read from the frame buffer. Outside the visible area the output is
// black, as a VGA monitor expects during blanking. Combinational; the
// priority order and the sprite colours are this design's choices.
module pixel_mux
  import space_shoot_pkg::*;
(
  input  logic video_on,
  input  logic text_pix,
  input  logic missile_pix,
  input  logic ship_pix,
  input  logic alien_pix,
  input  rgb_t bg_rgb,
  output rgb_t rgb
);

  always_comb begin
    if (!video_on)        rgb = COL_BLACK;
    else if (text_pix)    rgb = COL_TEXT;
    else if (missile_pix) rgb = COL_MISSILE;
    else if (ship_pix)    rgb = COL_SHIP;
    else if (alien_pix)   rgb = COL_ALIEN;
    else                  rgb = bg_rgb;
  end

endmodule
