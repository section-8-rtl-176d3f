// score: one player's point counter with win detection.
//
// A point is detected from the ball position alone: the player scores when
// the ball stands in GOAL_COL, the column behind the opponent's paddle.
// The ball module keeps the ball there for exactly one clock before serving
// it again, so each point is counted once. Score stops at WIN_SCORE and Win
// goes high when it gets there; the top uses Win to hold the ball until
// reset.
//
// Detecting the point from the ball position follows the document. The
// winning score (7, so it fits one HEX digit) and stopping the game on a win
// are this design's choices.
//
// Timing: Score is a register, updated on the rising clk edge; Win is
// decoded from it. reset is synchronous, active high, and clears the score.
module score
  import pong_pkg::*;
#(
  parameter int unsigned GOAL_COL  = P2_COL,
  parameter int unsigned WIN_SCORE = 7
) (
  input  logic      clk,
  input  logic      reset,
  input  ball_pos_t BallPos,
  output logic [3:0] Score,
  output logic       Win
);

  assign Win = (Score == 4'(WIN_SCORE));

  always_ff @(posedge clk) begin
    if (reset)
      Score <= '0;
    else if (BallPos.x == coord_t'(GOAL_COL) && !Win)
      Score <= Score + 1'b1;
  end

endmodule
