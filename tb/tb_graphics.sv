// tb_graphics: test of the game and picture core without the mouse.
//
// A vga_sync instance supplies the scan; the buttons are driven directly.
// The test captures rgb_stream (one pixel late, registered on p_tick) and
// checks a frame against the expected layers: text, aliens, ship, the
// frame-buffer background (including a block written through the write
// port), black blanking. It then moves the ship both ways, checks the
// step per frame, fires at an alien of the lowest row and checks the kill,
// the score and the missing alien in the next frame.
module tb_graphics;
  import space_shoot_pkg::*;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;
  int bad = 0;

  logic [9:0] px_x, px_y;
  logic hsync, vsync, p_tick, video_on;
  logic nes_left = 0, nes_right = 0, nes_a = 0;
  logic fb_we = 0, fb_re = 0;
  logic [FB_AW-1:0] fb_waddr = 0, fb_raddr = 0;
  rgb_t fb_wdata = 0, fb_rdata, rgb_stream;
  logic [9:0] score;
  logic [7:0] level;
  logic frame_tick, destruction, restart;

  vga_sync u_vga (.clk, .not_reset, .pixel_x(px_x), .pixel_y(px_y), .hsync, .vsync, .p_tick, .video_on);
  graphics #(.N_ALIENS(2), .MOVE_FRAMES(12), .SHIP_STEP(8), .MISSILE_STEP(48), .MISSILE_H(48)) dut (
    .clk, .reset_n(not_reset), .px_x, .px_y, .p_tick, .video_on, .nes_left, .nes_right, .nes_a,
    .fb_we, .fb_waddr, .fb_wdata, .fb_re, .fb_raddr, .fb_rdata, .rgb_stream, .score, .level,
    .frame_tick, .destruction, .restart);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", msg); end
  endtask

  logic [2:0] scr [480][640];
  int blank_nonblack = 0;
  logic pend = 0, pend_vis = 0;
  logic [9:0] pend_x = 0, pend_y = 0;
  always @(negedge clk) begin
    if (pend) begin
      if (pend_vis) scr[pend_y][pend_x] = rgb_stream;
      else if (rgb_stream != 0) blank_nonblack++;
    end
    pend = not_reset && p_tick; pend_vis = video_on; pend_x = px_x; pend_y = px_y;
  end

  task automatic wait_frames(input int n);
    repeat (n) begin
      @(posedge clk);
      while (!frame_tick) @(posedge clk);
    end
  endtask

  string pat [11] = '{
    ".....#.....", "....###....", "...#####...", "..#######..", ".#########.",
    "###########", "....###....", "...##.##...", "..##...##..", ".##.....##.", "##.......##"
  };

  // full check of the alien and ship areas of the last frame
  task automatic check_frame(input string tag, input logic [1:0] alive_low_row);
    int mx, my, sx;
    mx = dut.u_motion.master_x; my = dut.u_motion.master_y; sx = dut.u_ship.ship_x;
    bad = 0;
    for (int g = 0; g < 3; g++)
      for (int i = 0; i < 2; i++)
        for (int r = 0; r < 32; r++)
          for (int c = 0; c < 32; c++) begin
            bit on;
            on = (r >= 5 && r < 27 && c >= 5 && c < 27) && pat[(r - 5) / 2][(c - 5) / 2] == "#";
            if (g == 2 && !alive_low_row[i]) on = 0;
            if (scr[my + 48 * g + r][mx + 48 * i + c] != (on ? 3'b110 : 3'b100)) bad++;
          end
    check(bad == 0, $sformatf("%s: %0d alien-area pixels wrong", tag, bad));
    bad = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 32; c++)
        if (scr[440 + r][sx + c] != ((c >= 15 - r && c <= 16 + r) ? 3'b010 : 3'b100)) bad++;
    check(bad == 0, $sformatf("%s: %0d ship-area pixels wrong", tag, bad));
    check(scr[8][12] == 3'b111 && scr[8][10] == 3'b100, $sformatf("%s: text", tag));
    check(scr[300][300] == 3'b100, $sformatf("%s: background", tag));
    check(blank_nonblack == 0, $sformatf("%s: colour in blanking", tag));
  endtask

  initial begin
    int sx0, target, h0, frames_flight;
    repeat (5) @(negedge clk);
    not_reset = 1;
    // a green 1x1 frame-buffer pixel at (50,60) covers screen 100..101, 120..121
    @(negedge clk); fb_we = 1; fb_waddr = FB_AW'(60 * 320 + 50); fb_wdata = 3'b010;
    @(negedge clk); fb_we = 0; fb_re = 1; fb_raddr = FB_AW'(60 * 320 + 50);
    @(negedge clk); fb_re = 0;
    check(fb_rdata == 3'b010, "frame buffer port B read");
    wait_frames(2);
    check_frame("first frame", 2'b11);
    check(scr[120][100] == 3'b010 && scr[121][101] == 3'b010 && scr[122][102] == 3'b100,
          "frame-buffer pixel shown as a 2x2 block");
    sx0 = dut.u_ship.ship_x;
    nes_right = 1; wait_frames(5); nes_right = 0;
    check(int'(dut.u_ship.ship_x) == sx0 + 40, "ship moved right 8 per frame");
    nes_left = 1; wait_frames(2); nes_left = 0;
    check(int'(dut.u_ship.ship_x) == sx0 + 24, "ship moved left 8 per frame");
    // aim under alien 1 of the lowest row, at the formation's next position
    @(posedge clk); while (!dut.move_step) @(posedge clk);
    @(posedge clk);
    target = int'(dut.u_motion.master_x) + 16 + 48;
    nes_left = (int'(dut.u_ship.ship_x) > target); nes_right = (int'(dut.u_ship.ship_x) < target);
    while (int'(dut.u_ship.ship_x) != target) @(posedge clk);
    nes_left = 0; nes_right = 0;
    @(posedge clk); while (!dut.move_step) @(posedge clk);
    @(posedge clk);
    check(int'(dut.u_motion.master_x) + 48 == target, $sformatf("formation at %0d, ship at %0d, target %0d", dut.u_motion.master_x, dut.u_ship.ship_x, target));
    h0 = 0;
    nes_a = 1; wait_frames(1); @(posedge clk); nes_a = 0;
    frames_flight = 0;
    while (dut.u_missile.active && frames_flight < 10) begin wait_frames(1); frames_flight++; end
    check(!dut.u_missile.active, "missile ended");
    check(score == 10'd2, $sformatf("score %0d after the hit", score));
    check(dut.g_row[2].alive == 2'b01, "alien 1 of the lowest row destroyed");
    check(dut.g_row[1].alive == 2'b11 && dut.g_row[0].alive == 2'b11, "other rows untouched");
    blank_nonblack = 0;
    wait_frames(1);
    check_frame("after the hit", 2'b01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * 840000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
