// game_score: score, level and the start of a new wave.
//
// Each destroyed alien (destruction, a one-clock pulse) adds 2 to the score.
// When all three alien groups report defeated, restart pulses for exactly
// one clock and the level goes up by one; the groups bring their aliens
// back on that pulse, so defeated falls again on the next clock. restart is
// not raised twice in a row, which keeps the level from counting the same
// wave twice. The scoring rule (+2), the restart condition and the level
// increment follow the original design; the widths are this design's.
module game_score #(
  parameter int unsigned SCORE_W = 10,
  parameter int unsigned LEVEL_W = 8
) (
  input  logic               clk,
  input  logic               not_reset,
  input  logic               destruction,
  input  logic [2:0]         defeated,
  output logic               restart,
  output logic [SCORE_W-1:0] score,
  output logic [LEVEL_W-1:0] level
);

  wire all_defeated = &defeated;

  always_ff @(posedge clk) begin
    if (!not_reset) begin
      restart <= 1'b0;
      score   <= '0;
      level   <= '0;
    end else begin
      restart <= all_defeated && !restart;
      if (all_defeated && !restart) level <= level + 1'b1;
      if (destruction) score <= score + SCORE_W'(2);
    end
  end

  a_restart_single: assert property (@(posedge clk) disable iff (!not_reset) restart |=> !restart);

endmodule
