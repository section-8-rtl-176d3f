// pong: two-player Pong on the 16 x 16 bicolor LED board.
//
// The field is drawn with orange walls on rows 0 and 15, a five-row green
// paddle per player in columns 0 (Player 1, left) and 15 (Player 2, right)
// and a one-pixel red ball. The ball moves diagonally, bounces off the walls
// and the paddles, and a player scores when it reaches the column behind the
// other player's paddle. Each point serves the ball again from (7, 7) in a
// random diagonal direction. KEY[3]/KEY[2] move Player 1 up/down and
// KEY[1]/KEY[0] Player 2; SW[9] is reset; HEX0 shows Player 1's score and
// HEX5 Player 2's. The first to WIN_SCORE points wins and the ball then
// stays in the centre until reset.
//
// Structure, left to right: clock_divider makes the game clock (bit
// GAME_CLOCK of a counter on CLOCK_50) and the LED scan clock (bit
// LED_CLOCK); user_input synchronises the keys and makes one pulse per
// press; two paddle instances hold the paddle positions;
// collision_detection turns ball position, ball direction and paddles into
// the corrected direction NewDir; ball moves on NewDir every TICK_MAX + 1
// game clocks; two score instances count points from the ball position;
// board draws RedPixels and GrnPixels; two seg7 drive HEX0 and HEX5. The
// LED board driver is not part of this design: RedPixels, GrnPixels,
// LedClk and LedReset are brought out for it.
//
// The block split and the signals between blocks follow the document's
// decomposition of the game. The clock rates, winning score and unused HEX
// displays (HEX1 to HEX4 dark) are this design's choices. SW[8:0] are not
// used.
//
// Timing: all game state changes on the rising edge of the game clock,
// 50 MHz / 2^(GAME_CLOCK+1) (about 11.9 Hz by default, so the ball makes
// about three moves a second). reset (SW[9]) is synchronous to the game clock and
// must be held for at least one of its periods.
module pong
  import pong_pkg::*;
#(
  parameter int unsigned GAME_CLOCK = 21,
  parameter int unsigned LED_CLOCK  = 14,
  parameter int unsigned TICK_MAX   = 3,
  parameter int unsigned WIN_SCORE  = 7
) (
  input  logic       CLOCK_50,
  input  logic [3:0] KEY,
  input  logic [9:0] SW,
  output logic [6:0] HEX0,
  output logic [6:0] HEX1,
  output logic [6:0] HEX2,
  output logic [6:0] HEX3,
  output logic [6:0] HEX4,
  output logic [6:0] HEX5,
  output pixels_t    RedPixels,
  output pixels_t    GrnPixels,
  output logic       LedClk,
  output logic       LedReset
);

  logic [31:0] divided_clocks;
  logic        clk, reset;
  logic [3:0]  KeyPulse;
  coord_t      P1Pos, P2Pos;
  ball_pos_t   BallPos;
  dir_t        BallDir, NewDir;
  logic [3:0]  P1Score, P2Score;
  logic        P1Win, P2Win;

  clock_divider u_clock_divider (.clock(CLOCK_50), .divided_clocks(divided_clocks));

  assign clk      = divided_clocks[GAME_CLOCK];
  assign reset    = SW[9];
  assign LedClk   = divided_clocks[LED_CLOCK];
  assign LedReset = reset;

  user_input #(.N(4)) u_user_input (
    .clk(clk), .reset(reset), .key_n(KEY), .pulse(KeyPulse)
  );

  paddle u_paddle1 (.clk(clk), .reset(reset), .up(KeyPulse[3]), .down(KeyPulse[2]), .Pos(P1Pos));
  paddle u_paddle2 (.clk(clk), .reset(reset), .up(KeyPulse[1]), .down(KeyPulse[0]), .Pos(P2Pos));

  collision_detection u_collision (
    .P1Pos(P1Pos), .P2Pos(P2Pos), .BallPos(BallPos), .BallDir(BallDir), .NewDir(NewDir)
  );

  ball #(.TICK_MAX(TICK_MAX)) u_ball (
    .clk(clk), .reset(reset), .hold(P1Win || P2Win), .NewDir(NewDir),
    .BallPos(BallPos), .BallDir(BallDir)
  );

  // Player 1 scores in Player 2's goal column and the other way round.
  score #(.GOAL_COL(P2_COL), .WIN_SCORE(WIN_SCORE)) u_score1 (
    .clk(clk), .reset(reset), .BallPos(BallPos), .Score(P1Score), .Win(P1Win)
  );
  score #(.GOAL_COL(P1_COL), .WIN_SCORE(WIN_SCORE)) u_score2 (
    .clk(clk), .reset(reset), .BallPos(BallPos), .Score(P2Score), .Win(P2Win)
  );

  board u_board (
    .P1Pos(P1Pos), .P2Pos(P2Pos), .BallPos(BallPos),
    .RedPixels(RedPixels), .GrnPixels(GrnPixels)
  );

  seg7 u_hex0 (.bcd(P1Score), .leds(HEX0));
  seg7 u_hex5 (.bcd(P2Score), .leds(HEX5));

  assign HEX1 = '1;
  assign HEX2 = '1;
  assign HEX3 = '1;
  assign HEX4 = '1;

endmodule
