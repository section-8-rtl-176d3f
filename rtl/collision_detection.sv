// collision_detection: next ball direction after wall and paddle bounces.
//
// Purely combinational. NewDir starts equal to BallDir and is then
// overridden, in order:
//   * wall bounce: the ball is on row 1 heading north, or on row 14 heading
//     south, so its vertical bit flips;
//   * paddle bounce: the ball is in column 1 heading west (Player 1) or in
//     column 14 heading east (Player 2), and the row it will move to,
//     computed with the vertical direction already corrected by the wall
//     check, lies on that player's paddle; its horizontal bit flips.
// Both can happen at once (a ball that meets a paddle at a corner).
// If the ball heads into an edge column with no paddle in the way, NewDir
// is left alone and the ball goes on into the goal column.
//
// The two collision regions, the order of the checks and the use of the
// future row follow the game's description. Checking the wall first so the
// paddle test sees the corrected row is this design's choice.
//
// Ports: P1Pos, P2Pos are paddle offsets from row 1 (the paddle covers
// rows Pos+1 .. Pos+5); BallPos is (x, y); BallDir and NewDir are dir_t.
module collision_detection
  import pong_pkg::*;
(
  input  coord_t    P1Pos,
  input  coord_t    P2Pos,
  input  ball_pos_t BallPos,
  input  dir_t      BallDir,
  output dir_t      NewDir
);

  logic [1:0] dir;
  logic [4:0] future_y;   // one bit wider than a coordinate, never wraps

  // True when row y lies on a paddle at offset pos (rows pos+1 .. pos+5).
  function automatic logic on_paddle(input logic [4:0] y, input coord_t pos);
    return (y >= 5'(pos) + 5'd1) && (y <= 5'(pos) + 5'(PADDLE_LEN));
  endfunction

  always_comb begin
    dir = BallDir;

    // Wall collisions.
    if (BallPos.y == coord_t'(WALL_TOP + 1) && !dir[DIR_SOUTH_BIT])
      dir[DIR_SOUTH_BIT] = 1'b1;
    else if (BallPos.y == coord_t'(WALL_BOT - 1) && dir[DIR_SOUTH_BIT])
      dir[DIR_SOUTH_BIT] = 1'b0;

    // Row the ball moves to on its next step.
    future_y = dir[DIR_SOUTH_BIT] ? 5'(BallPos.y) + 5'd1 : 5'(BallPos.y) - 5'd1;

    // Paddle collisions.
    if (BallPos.x == coord_t'(P1_COL + 1) && dir[DIR_WEST_BIT] && on_paddle(future_y, P1Pos))
      dir[DIR_WEST_BIT] = 1'b0;
    else if (BallPos.x == coord_t'(P2_COL - 1) && !dir[DIR_WEST_BIT] && on_paddle(future_y, P2Pos))
      dir[DIR_WEST_BIT] = 1'b1;

    NewDir = dir_t'(dir);
  end

endmodule
