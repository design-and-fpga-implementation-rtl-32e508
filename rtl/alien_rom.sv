// alien_rom: the 32x32 one-bit image of an alien.
//
// The alien is an 11x11 pattern of set cells (a pointed head widening to a
// full-width row, then two pairs of legs spreading outwards). Each cell is
// drawn as a 2x2 pixel block, and the resulting 22x22 figure is centred in
// the 32x32 array, five pixels from each edge on the top and left. The
// pattern is the one the game was designed with; the 2x scaling and the
// centring are this design's choice. The ROM is a constant table read
// combinationally: pix is valid in the same cycle as row and col.
module alien_rom (
  input  logic [4:0] row,
  input  logic [4:0] col,
  output logic       pix
);

  // Column 0 of the pattern is the most significant bit.
  localparam logic [10:0] PATTERN [11] = '{
    11'b00000100000,
    11'b00001110000,
    11'b00011111000,
    11'b00111111100,
    11'b01111111110,
    11'b11111111111,
    11'b00001110000,
    11'b00011011000,
    11'b00110001100,
    11'b01100000110,
    11'b11000000011
  };
  localparam int unsigned OFFSET = 5;
  localparam int unsigned SPAN   = 22;

  logic [4:0] r_off, c_off;
  logic [3:0] cell_r, cell_c;

  always_comb begin
    r_off  = row - 5'(OFFSET);
    c_off  = col - 5'(OFFSET);
    cell_r = r_off[4:1];
    cell_c = c_off[4:1];
    pix    = 1'b0;
    if (row >= 5'(OFFSET) && row < 5'(OFFSET + SPAN) &&
        col >= 5'(OFFSET) && col < 5'(OFFSET + SPAN))
      pix = PATTERN[cell_r][4'd10 - cell_c];
  end

endmodule
