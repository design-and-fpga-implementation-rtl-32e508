// tb_alien_rom: checks all 1024 pixels of the alien image against the
// 11x11 pattern written out here as text, drawn 2x with a 5-pixel margin.
module tb_alien_rom;
  int checks = 0, failures = 0;
  logic [4:0] row, col;
  logic pix;
  alien_rom dut (.row, .col, .pix);

  string pat [11] = '{
    ".....#.....",
    "....###....",
    "...#####...",
    "..#######..",
    ".#########.",
    "###########",
    "....###....",
    "...##.##...",
    "..##...##..",
    ".##.....##.",
    "##.......##"
  };

  int ones = 0;
  initial begin
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) begin
        bit e;
        row = 5'(r); col = 5'(c);
        #1;
        e = (r >= 5 && r < 27 && c >= 5 && c < 27) ? (pat[(r - 5) / 2][(c - 5) / 2] == "#") : 0;
        checks++;
        if (pix != e) begin failures++; $display("FAIL r%0d c%0d got %b", r, c, pix); end
        if (pix) ones++;
      end
    checks++;
    if (ones != 4 * 55) begin failures++; $display("FAIL %0d set pixels", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
