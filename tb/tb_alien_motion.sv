// tb_alien_motion: runs the formation for many steps and compares its
// coordinates with a reference model of the step rules: +-16 in x with a
// turn (no move) at the edges, +-4 alternately in y, and restart.
module tb_alien_motion;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic step, restart, moving_right, turned;
  logic [9:0] master_x, master_y;
  alien_motion dut (.clk, .not_reset, .step, .restart, .master_x, .master_y, .moving_right, .turned);

  int rx, ry, turns;
  bit rright, rup;
  initial begin
    step = 0; restart = 0; turns = 0;
    repeat (3) @(posedge clk);
    not_reset = 1;
    @(posedge clk);
    rx = 192; ry = 98; rright = 1; rup = 1;
    for (int i = 0; i < 200; i++) begin
      checks++;
      if (master_x != 10'(rx) || master_y != 10'(ry)) begin
        failures++; $display("FAIL step %0d: %0d,%0d exp %0d,%0d", i, master_x, master_y, rx, ry);
      end
      if (i == 150) begin
        restart = 1; @(posedge clk); restart = 0; @(posedge clk);
        rx = 192; ry = 98; rright = 1; rup = 1;
        continue;
      end
      step = 1; @(posedge clk); step = 0; @(posedge clk);
      ry = rup ? ry - 4 : ry + 4; rup = !rup;
      if (rright) begin if (rx + 368 == 640) begin rright = 0; turns++; end else rx += 16; end
      else        begin if (rx == 0) begin rright = 1; turns++; end else rx -= 16; end
    end
    checks++;
    if (turns < 4) begin failures++; $display("FAIL only %0d turns", turns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
