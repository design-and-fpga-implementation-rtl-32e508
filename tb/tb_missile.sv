// tb_missile: checks launch position, the climb of 8 pixels per frame,
// removal at the top of the screen and on a hit, one missile at a time,
// and the missile rectangle.
module tb_missile;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;
  int bad = 0;
  int sx, sy;  // scan position, kept at module level across the per-pixel waits

  logic frame_tick, fire, hit, missile_pix, active, launched;
  logic [9:0] ship_x, px_x, px_y, missile_x, missile_y;
  missile dut (.clk, .not_reset, .frame_tick, .fire, .hit, .ship_x, .px_x, .px_y,
               .missile_pix, .active, .missile_x, .missile_y, .launched);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  task automatic tick;
    @(negedge clk); frame_tick = 1; @(negedge clk); frame_tick = 0; @(negedge clk);
  endtask

  initial begin
    int n;
    frame_tick = 0; fire = 0; hit = 0; ship_x = 100; px_x = 0; px_y = 0;
    repeat (3) @(negedge clk);
    not_reset = 1;
    @(negedge clk);
    check(!active, "idle after reset");
    tick;
    check(!active, "no launch without fire");
    fire = 1; tick; fire = 0;
    check(active && missile_x == 114 && missile_y == 432, $sformatf("launch at %0d,%0d", missile_x, missile_y));
    // rectangle
    begin
      bad = 0;
      sy = 425; sx = 108;
      while (sy < 445) begin
        px_x = 10'(sx); px_y = 10'(sy); #1;
        if (missile_pix != (sx >= 114 && sx < 118 && sy >= 432 && sy < 440)) bad++;
        sx++;
        if (sx == 124) begin sx = 108; sy++; end
      end
      check(bad == 0, $sformatf("%0d missile pixels wrong", bad));
    end
    ship_x = 300; fire = 1; tick;
    check(missile_x == 114 && missile_y == 424, "moves up 8, no second missile");
    fire = 0;
    n = 1;
    while (active && n < 100) begin tick; n++; end
    check(n == 55, $sformatf("left the screen after %0d frames", n));
    fire = 1; tick; fire = 0;
    check(active && missile_x == 314, "relaunch from new ship position");
    tick; tick;
    @(negedge clk); hit = 1; @(negedge clk); hit = 0;
    check(!active, "removed on hit");
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
