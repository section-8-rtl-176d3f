// board: draws the Pong field into the two LED colour planes.
//
// Purely combinational. Rows 0 and 15 are the walls, lit in both planes so
// they show orange (red + green). The paddles are green: Player 1's in
// column 0 and Player 2's in column 15, each covering rows Pos+1 .. Pos+5.
// The ball is a single red pixel at (x, y), pixel RedPixels[y][x].
//
// Colours and sizes follow the document; the pixel indexing is
// Pixels[row][column] as the LED board's arrays are defined.
module board
  import pong_pkg::*;
(
  input  coord_t    P1Pos,
  input  coord_t    P2Pos,
  input  ball_pos_t BallPos,
  output pixels_t   RedPixels,
  output pixels_t   GrnPixels
);

  always_comb begin
    RedPixels = '0;
    GrnPixels = '0;

    RedPixels[WALL_TOP] = '1;
    GrnPixels[WALL_TOP] = '1;
    RedPixels[WALL_BOT] = '1;
    GrnPixels[WALL_BOT] = '1;

    for (int unsigned i = 1; i <= PADDLE_LEN; i++) begin
      GrnPixels[32'(P1Pos) + i][P1_COL] = 1'b1;
      GrnPixels[32'(P2Pos) + i][P2_COL] = 1'b1;
    end

    RedPixels[BallPos.y][BallPos.x] = 1'b1;
  end

endmodule
