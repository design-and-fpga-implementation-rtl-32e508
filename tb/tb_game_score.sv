// tb_game_score: checks +2 per destruction, the single restart pulse and
// the level increment when all three groups are defeated.
module tb_game_score;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic destruction, restart;
  logic [2:0] defeated;
  logic [9:0] score;
  logic [7:0] level;
  game_score dut (.clk, .not_reset, .destruction, .defeated, .restart, .score, .level);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int n_restart = 0;
  always @(posedge clk) if (not_reset && restart) n_restart++;
  // the groups clear defeated on the restart pulse
  always @(posedge clk) if (restart) defeated <= 3'b000;

  initial begin
    int exp_score, exp_level;
    destruction = 0; defeated = 0; exp_score = 0; exp_level = 0;
    repeat (3) @(posedge clk);
    not_reset = 1;
    @(posedge clk);
    check(score == 0 && level == 0, "reset values");
    for (int w = 0; w < 3; w++) begin
      for (int k = 0; k < 3; k++) begin
        repeat (1 + $urandom % 4) @(posedge clk);
        destruction <= 1; @(posedge clk); destruction <= 0; @(posedge clk);
        exp_score += 2;
        check(score == 10'(exp_score), $sformatf("score %0d exp %0d", score, exp_score));
        check(!restart, "no restart while groups remain");
        defeated[k] <= 1'b1;
      end
      repeat (4) @(posedge clk);
      exp_level++;
      check(level == 8'(exp_level), $sformatf("level %0d exp %0d", level, exp_level));
      check(n_restart == w + 1, $sformatf("restart pulses %0d", n_restart));
    end
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
