// tb_spaceship: checks movement per frame tick in both directions, the
// stops at the screen edges, no movement with both or no buttons, and the
// triangular ship image against a reference.
module tb_spaceship;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;
  int bad = 0;
  int sx, sy, sc, sr;  // scan position, kept at module level across the per-pixel waits
  bit se;

  logic frame_tick, move_left, move_right, ship_pix;
  logic [9:0] px_x, px_y, ship_x;
  spaceship dut (.clk, .not_reset, .frame_tick, .move_left, .move_right, .px_x, .px_y, .ship_x, .ship_pix);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  task automatic frames(input int n, input bit l, input bit r);
    move_left = l; move_right = r;
    repeat (n) begin
      @(negedge clk); frame_tick = 1; @(negedge clk); frame_tick = 0;
      repeat (3) @(negedge clk);
    end
    move_left = 0; move_right = 0;
  endtask

  initial begin
    int ex;
    frame_tick = 0; move_left = 0; move_right = 0; px_x = 0; px_y = 0;
    repeat (3) @(negedge clk);
    not_reset = 1;
    @(negedge clk);
    ex = 304;
    check(ship_x == 10'(ex), "start position");
    // image
    begin
      bad = 0;
      sy = 430; sx = ex - 4;
      while (sy < 470) begin
        sc = sx - ex; sr = sy - 440;
        se = (sc >= 0 && sc < 32 && sr >= 0 && sr < 16) && (sc >= 15 - sr) && (sc <= 16 + sr);
        px_x = 10'(sx); px_y = 10'(sy); #1;
        if (ship_pix != se) bad++;
        sx++;
        if (sx == ex + 40) begin sx = ex - 4; sy++; end
      end
      check(bad == 0, $sformatf("%0d ship pixels wrong", bad));
    end
    frames(5, 1, 0); ex -= 20;
    check(ship_x == 10'(ex), $sformatf("left: %0d exp %0d", ship_x, ex));
    frames(3, 0, 1); ex += 12;
    check(ship_x == 10'(ex), $sformatf("right: %0d exp %0d", ship_x, ex));
    frames(4, 1, 1);
    check(ship_x == 10'(ex), "both buttons: no move");
    move_left = 1; repeat (10) @(negedge clk); move_left = 0;
    check(ship_x == 10'(ex), "no move without frame tick");
    frames(100, 1, 0);
    check(ship_x == 0, $sformatf("left edge %0d", ship_x));
    frames(200, 0, 1);
    check(ship_x == 608, $sformatf("right edge %0d", ship_x));
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
