// tb_alien_group: checks the picture of a row of three aliens pixel by
// pixel against a reference drawn from the alien pattern, then missile hits
// on set and unset pixels, the alive flags, defeated and restart.
module tb_alien_group;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;
  int bad = 0;
  int sx, sy;  // scan position, kept at module level across the per-pixel waits

  localparam int N = 3, PITCH = 48, ROFF = 48, OX = 100, OY = 50;
  logic [9:0] px_x, px_y;
  logic p_tick, missile_pix, restart, alien_pix, hit, defeated;
  logic [N-1:0] alive;
  alien_group #(.N_ALIENS(N), .PITCH(PITCH), .ROW_OFFSET(ROFF)) dut (
    .clk, .not_reset, .origin_x(10'(OX)), .origin_y(10'(OY)), .px_x, .px_y, .p_tick,
    .missile_pix, .restart, .alien_pix, .hit, .defeated, .alive);

  string pat [11] = '{
    ".....#.....", "....###....", "...#####...", "..#######..", ".#########.",
    "###########", "....###....", "...##.##...", "..##...##..", ".##.....##.", "##.......##"
  };

  function automatic bit ref_pix(int x, int y, logic [N-1:0] alv);
    int rx, ry, s, c;
    rx = x - OX; ry = y - OY - ROFF;
    if (rx < 0 || ry < 0 || ry >= 32) return 0;
    s = rx / PITCH; c = rx % PITCH;
    if (s >= N || c >= 32 || !alv[s]) return 0;
    if (ry < 5 || ry >= 27 || c < 5 || c >= 27) return 0;
    return pat[(ry - 5) / 2][(c - 5) / 2] == "#";
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic scan(input logic [N-1:0] alv);
    bad = 0;
    sy = OY + ROFF - 4; sx = OX - 4;
    while (sy < OY + ROFF + 36) begin
      px_x = 10'(sx); px_y = 10'(sy); #1;
      if (alien_pix != ref_pix(sx, sy, alv)) bad++;
      sx++;
      if (sx == OX + N * PITCH + 4) begin sx = OX - 4; sy++; end
    end
    check(bad == 0, $sformatf("%0d picture pixels differ (alive %b)", bad, alv));
  endtask

  task automatic shoot(input int x, input int y, input bit expect_hit);
    @(negedge clk);
    px_x = 10'(x); px_y = 10'(y); missile_pix = 1; p_tick = 1;
    @(negedge clk);
    missile_pix = 0; p_tick = 0;
    check(hit == expect_hit, $sformatf("hit=%b at %0d,%0d", hit, x, y));
    @(negedge clk);
    check(!hit, "hit lasts one clock");
  endtask

  initial begin
    p_tick = 0; missile_pix = 0; restart = 0; px_x = 0; px_y = 0;
    repeat (3) @(negedge clk);
    not_reset = 1;
    @(negedge clk);
    check(alive == '1 && !defeated, "all alive after reset");
    scan(3'b111);
    // corner of alien 1: no set pixel there
    shoot(OX + PITCH + 1, OY + ROFF + 1, 0);
    check(alive == 3'b111, "miss leaves all alive");
    // missile covers the pixel but p_tick is low: nothing happens
    @(negedge clk); px_x = 10'(OX + PITCH + 16); px_y = 10'(OY + ROFF + 10); missile_pix = 1; p_tick = 0;
    @(negedge clk); missile_pix = 0;
    check(alive == 3'b111 && !hit, "no hit without p_tick");
    shoot(OX + PITCH + 16, OY + ROFF + 10, 1);
    check(alive == 3'b101, "alien 1 dead");
    scan(3'b101);
    shoot(OX + PITCH + 16, OY + ROFF + 10, 0);
    shoot(OX + 5, OY + ROFF + 26, 1);
    shoot(OX + 2 * PITCH + 26, OY + ROFF + 15, 1);
    check(alive == 3'b000 && defeated, "row defeated");
    scan(3'b000);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    check(alive == 3'b111 && !defeated, "restart brings the row back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
