// pong_pkg: types and constants shared by the Pong game on the 16 x 16
// bicolor LED board.
//
// Coordinates: x is the column (0 = Player 1's edge, 15 = Player 2's edge),
// y is the row (0 = top wall, 15 = bottom wall). A pixel (x, y) is bit
// Pixels[y][x] of a pixel array, so Pixels[i] is row i and Pixels[i][j] is
// the pixel at row i, column j.
//
// The ball direction is two bits: bit 1 is north (0) / south (1) and bit 0
// is east (0) / west (1), which gives 0 = NE, 1 = NW, 2 = SE, 3 = SW.
// North decreases y and east increases x.
//
// A paddle position is the paddle's offset from row 1: position p covers
// rows p+1 .. p+5. Positions run 0 .. PADDLE_MAX so a paddle never covers a
// wall row.
package pong_pkg;

  localparam int unsigned BOARD_SIZE = 16;   // LED board is 16 x 16
  localparam int unsigned PADDLE_LEN = 5;    // paddle length in rows
  localparam int unsigned WALL_TOP   = 0;    // orange rows
  localparam int unsigned WALL_BOT   = BOARD_SIZE - 1;
  localparam int unsigned P1_COL     = 0;    // Player 1 paddle and goal column
  localparam int unsigned P2_COL     = BOARD_SIZE - 1;
  // Highest paddle offset: rows 1 .. 14 hold 14 - 5 + 1 = 10 positions.
  localparam int unsigned PADDLE_MAX = BOARD_SIZE - 2 - PADDLE_LEN;
  localparam int unsigned CENTER     = 7;    // serve position (7, 7)

  typedef logic [3:0] coord_t;

  // Packed so that BallPos[1] is x and BallPos[0] is y.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } ball_pos_t;

  typedef enum logic [1:0] {
    DIR_NE = 2'd0,
    DIR_NW = 2'd1,
    DIR_SE = 2'd2,
    DIR_SW = 2'd3
  } dir_t;

  // One 16 x 16 colour plane: two packed dimensions, [row][column].
  typedef logic [BOARD_SIZE-1:0][BOARD_SIZE-1:0] pixels_t;

  localparam int unsigned DIR_SOUTH_BIT = 1;
  localparam int unsigned DIR_WEST_BIT  = 0;

endpackage
