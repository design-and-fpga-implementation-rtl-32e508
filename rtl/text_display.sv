// text_display: draws the score and level as a line of text.
//
// The line "SCORE dddd LEVEL ddd" (20 characters) starts at (X0, Y0). Each
// character is an 8x8 glyph drawn at twice its size, so a character cell is
// 16x16 pixels and the line is 320x16. For the scanned pixel the module
// picks the character cell (rel_x / 16), the glyph row and column (the
// pixel offsets halved), looks the glyph up in a small font table of the
// digits and the letters S, C, O, R, E, L, V, and sets text_pix when that
// glyph bit is set. It is purely combinational. The text and the font are
// this design's own; the original only names a text display module.
module text_display #(
  parameter int unsigned X0 = 8,
  parameter int unsigned Y0 = 8
) (
  input  logic [9:0]  px_x,
  input  logic [9:0]  px_y,
  input  logic [15:0] score_bcd,
  input  logic [11:0] level_bcd,
  output logic        text_pix
);

  localparam int unsigned N_CHARS = 20;

  typedef enum logic [4:0] {
    CH_0 = 5'd0, CH_S = 5'd10, CH_C, CH_O, CH_R, CH_E, CH_L, CH_V, CH_SP
  } char_t;

  // One glyph per entry, row 0 in the top byte, column 0 in the MSB of a row.
  localparam logic [63:0] FONT [18] = '{
    64'h3C666E7666663C00,  // 0
    64'h1838181818187E00,  // 1
    64'h3C66060C30607E00,  // 2
    64'h3C66061C06663C00,  // 3
    64'h0C1C3C6C7E0C0C00,  // 4
    64'h7E607C0606663C00,  // 5
    64'h3C607C6666663C00,  // 6
    64'h7E060C1830303000,  // 7
    64'h3C66663C66663C00,  // 8
    64'h3C66663E060C3800,  // 9
    64'h3C66603C06663C00,  // S
    64'h3C66606060663C00,  // C
    64'h3C66666666663C00,  // O
    64'h7C66667C6C666600,  // R
    64'h7E60607C60607E00,  // E
    64'h6060606060607E00,  // L
    64'h66666666663C1800,  // V
    64'h0000000000000000   // space
  };

  logic signed [11:0] rel_x, rel_y;
  logic [4:0] cidx;
  logic [2:0] grow, gcol;
  logic [4:0] code;
  logic [63:0] glyph;

  always_comb begin
    rel_x = $signed({2'b00, px_x}) - $signed(12'(X0));
    rel_y = $signed({2'b00, px_y}) - $signed(12'(Y0));
    cidx  = rel_x[8:4];
    grow  = rel_y[3:1];
    gcol  = rel_x[3:1];
    unique case (cidx)
      5'd0:  code = CH_S;
      5'd1:  code = CH_C;
      5'd2:  code = CH_O;
      5'd3:  code = CH_R;
      5'd4:  code = CH_E;
      5'd6:  code = {1'b0, score_bcd[15:12]};
      5'd7:  code = {1'b0, score_bcd[11:8]};
      5'd8:  code = {1'b0, score_bcd[7:4]};
      5'd9:  code = {1'b0, score_bcd[3:0]};
      5'd11: code = CH_L;
      5'd12: code = CH_E;
      5'd13: code = CH_V;
      5'd14: code = CH_E;
      5'd15: code = CH_L;
      5'd17: code = {1'b0, level_bcd[11:8]};
      5'd18: code = {1'b0, level_bcd[7:4]};
      5'd19: code = {1'b0, level_bcd[3:0]};
      default: code = CH_SP;
    endcase
    glyph    = (code <= CH_SP) ? FONT[code] : '0;
    text_pix = (rel_x >= 0) && (rel_x < $signed(12'(16 * N_CHARS))) && (rel_y >= 0) && (rel_y < $signed(12'(16))) &&
               glyph[63 - (8 * int'(grow) + int'(gcol))];
  end

endmodule
