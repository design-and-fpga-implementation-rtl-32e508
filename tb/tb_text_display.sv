// tb_text_display: draws the text line for given score and level digits
// and checks every pixel against a reference built from the character
// string "SCORE dddd LEVEL ddd" and the font rows.
module tb_text_display;
  int checks = 0, failures = 0;
  int mism = 0;  // running total of mismatching pixels
  logic [9:0] px_x, px_y;
  logic [15:0] score_bcd;
  logic [11:0] level_bcd;
  logic text_pix;
  text_display dut (.px_x, .px_y, .score_bcd, .level_bcd, .text_pix);

  function automatic logic [63:0] glyph(byte ch);
    case (ch)
      "0": return 64'h3C666E7666663C00;  "1": return 64'h1838181818187E00;
      "2": return 64'h3C66060C30607E00;  "3": return 64'h3C66061C06663C00;
      "4": return 64'h0C1C3C6C7E0C0C00;  "5": return 64'h7E607C0606663C00;
      "6": return 64'h3C607C6666663C00;  "7": return 64'h7E060C1830303000;
      "8": return 64'h3C66663C66663C00;  "9": return 64'h3C66663E060C3800;
      "S": return 64'h3C66603C06663C00;  "C": return 64'h3C66606060663C00;
      "O": return 64'h3C66666666663C00;  "R": return 64'h7C66667C6C666600;
      "E": return 64'h7E60607C60607E00;  "L": return 64'h6060606060607E00;
      "V": return 64'h66666666663C1800;  default: return 64'h0;
    endcase
  endfunction

  // Module-level working variables: the pixel loop waits between
  // samples, so nothing here is kept in automatic task storage.
  string s;
  int mism0, rx, ry, gr, gc, x, y;
  bit e;
  logic [63:0] g;

  task run(input int score, input int level);
    mism0 = mism;
    s = $sformatf("SCORE %04d LEVEL %03d", score, level);
    score_bcd = {4'(score / 1000), 4'((score / 100) % 10), 4'((score / 10) % 10), 4'(score % 10)};
    level_bcd = {4'(level / 100), 4'((level / 10) % 10), 4'(level % 10)};
    y = 0; x = 0;
    while (y < 30) begin
      rx = x - 8; ry = y - 8;
      e = 0;
      if (rx >= 0 && rx < 320 && ry >= 0 && ry < 16) begin
        g = glyph(s[rx / 16]); gr = (ry % 16) / 2; gc = (rx % 16) / 2;
        e = g[63 - 8 * gr - gc];
      end
      px_x = 10'(x); px_y = 10'(y);
      #1;
      if (text_pix != e) mism++;
      x++;
      if (x == 340) begin x = 0; y++; end
    end
    checks++;
    if (mism != mism0) begin failures++; $display("FAIL %s: %0d pixels wrong", s, mism - mism0); end
  endtask

  initial begin
    run(0, 0); run(1234, 567); run(9876, 90); run(42, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
