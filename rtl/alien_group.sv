// alien_group: one row of aliens with their alive flags and hit detection.
//
// The row holds N_ALIENS aliens, each a 32x32 image from alien_rom, placed
// PITCH pixels apart starting at (origin_x, origin_y + ROW_OFFSET). For the
// pixel being scanned, (px_x, px_y), the module works out which alien slot
// it falls in and the ROM pixel there; alien_pix is set when that alien is
// still alive and its image has a set pixel there. Collision is decided in
// the same place, pixel by pixel: if the missile also covers this pixel
// (missile_pix) on a p_tick, that alien is marked dead and hit pulses for
// one clock. defeated is high once every alien of the row is dead; restart
// brings them all back. The per-pixel collision test follows the original
// design; the row layout is this design's own.
module alien_group
  import space_shoot_pkg::*;
#(
  parameter int unsigned N_ALIENS   = 8,
  parameter int unsigned PITCH      = 48,
  parameter int unsigned ROW_OFFSET = 0
) (
  input  logic       clk,
  input  logic       not_reset,
  input  logic [9:0] origin_x,
  input  logic [9:0] origin_y,
  input  logic [9:0] px_x,
  input  logic [9:0] px_y,
  input  logic       p_tick,
  input  logic       missile_pix,
  input  logic       restart,
  output logic       alien_pix,
  output logic       hit,
  output logic       defeated,
  output logic [N_ALIENS-1:0] alive
);

  localparam int unsigned IW = (N_ALIENS > 1) ? $clog2(N_ALIENS) : 1;

  logic signed [11:0] rel_x, rel_y;
  logic [11:0] slot, col_in_slot;
  logic        in_row;
  logic [IW-1:0] idx;
  logic        rom_pix;

  always_comb begin
    rel_x       = $signed({2'b00, px_x}) - $signed({2'b00, origin_x});
    rel_y       = $signed({2'b00, px_y}) - $signed({2'b00, origin_y}) - $signed(12'(ROW_OFFSET));
    slot        = 12'(rel_x) / 12'(PITCH);
    col_in_slot = 12'(rel_x) % 12'(PITCH);
    in_row      = (rel_x >= 0) && (rel_y >= 0) && (rel_y < $signed(12'(ALIEN_SIZE))) &&
                  (slot < 12'(N_ALIENS)) && (col_in_slot < 12'(ALIEN_SIZE));
    idx         = IW'(slot);
  end

  alien_rom u_rom (
    .row (rel_y[4:0]),
    .col (col_in_slot[4:0]),
    .pix (rom_pix)
  );

  assign alien_pix = in_row && rom_pix && alive[idx];
  assign defeated  = ~|alive;

  always_ff @(posedge clk) begin
    hit <= 1'b0;
    if (!not_reset || restart) begin
      alive <= '1;
    end else if (p_tick && alien_pix && missile_pix) begin
      alive[idx] <= 1'b0;
      hit        <= 1'b1;
    end
  end

endmodule
