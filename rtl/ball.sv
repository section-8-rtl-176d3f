// ball: position and direction of the Pong ball.
//
// The ball moves one diagonal step each time a speed counter reaches
// TICK_MAX: an up-counter compared with a constant is the enable of the
// position and direction registers, so with TICK_MAX = 3 the ball moves
// every fourth clock while a paddle can move on every clock. On a move the
// ball takes NewDir, the direction already corrected for collisions:
// NewDir[1] steps y (0 north = up, 1 south = down) and NewDir[0] steps x
// (0 east = right, 1 west = left). BallDir is then set to NewDir.
//
// Serve: on reset, and on the clock after the ball reaches a goal column
// (0 or 15, where the score counters see it for exactly one clock), the ball
// goes back to (7, 7) with the direction taken from the two low bits of a
// free-running LFSR, and the speed counter restarts so the first move comes
// TICK_MAX + 1 clocks later. While hold is high (game won) the ball does not
// move; a ball in a goal column is still served back to the centre.
//
// Using NewDir for the step, the counter-and-compare enable, the (7, 7)
// serve and the LFSR direction follow the document. Re-serving from the goal
// column after one clock and the hold input are this design's choices.
//
// Timing: BallPos and BallDir are registers, updated on the rising clk edge.
// reset is synchronous and active high.
module ball
  import pong_pkg::*;
#(
  parameter int unsigned TICK_MAX = 3
) (
  input  logic      clk,
  input  logic      reset,
  input  logic      hold,
  input  dir_t      NewDir,
  output ball_pos_t BallPos,
  output dir_t      BallDir
);

  localparam int unsigned CW = (TICK_MAX < 1) ? 1 : $clog2(TICK_MAX + 1);

  logic [CW-1:0] count;
  logic          step;
  logic          in_goal;
  logic [9:0]    rnd;

  lfsr #(.WIDTH(10)) u_lfsr (.clk(clk), .q(rnd));

  assign step    = (count == CW'(TICK_MAX));
  assign in_goal = (BallPos.x == coord_t'(P1_COL)) || (BallPos.x == coord_t'(P2_COL));

  always_ff @(posedge clk) begin
    if (reset || in_goal) begin
      BallPos <= '{x: coord_t'(CENTER), y: coord_t'(CENTER)};
      BallDir <= dir_t'(rnd[1:0]);
      count   <= '0;
    end else if (!hold) begin
      count <= step ? '0 : count + 1'b1;
      if (step) begin
        BallDir   <= NewDir;
        BallPos.x <= NewDir[DIR_WEST_BIT]  ? BallPos.x - 1'b1 : BallPos.x + 1'b1;
        BallPos.y <= NewDir[DIR_SOUTH_BIT] ? BallPos.y + 1'b1 : BallPos.y - 1'b1;
      end
    end
  end

  // The walls keep the ball off rows 0 and 15.
  always_ff @(posedge clk)
    if (!reset)
      assert (BallPos.y != coord_t'(WALL_TOP) && BallPos.y != coord_t'(WALL_BOT))
        else $error("ball entered a wall row: y=%0d", BallPos.y);

endmodule
