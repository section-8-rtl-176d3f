// board_tb: checks the drawn field pixel by pixel.
//
// For random paddle offsets (0 .. 9) and ball positions (x 0 .. 15,
// y 1 .. 14), and for the extreme paddle positions, every one of the 256
// pixels of both planes is compared with what the field should show: orange
// (both planes) on rows 0 and 15, green in column 0 on rows P1Pos+1 ..
// P1Pos+5 and in column 15 on rows P2Pos+1 .. P2Pos+5, red at the ball.
module board_tb;
  import pong_pkg::*;

  coord_t    P1Pos, P2Pos;
  ball_pos_t BallPos;
  pixels_t   RedPixels, GrnPixels;
  int checks = 0, failures = 0;

  board dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int p1, int p2, int bx, int by);
    P1Pos = coord_t'(p1);
    P2Pos = coord_t'(p2);
    BallPos = '{x: coord_t'(bx), y: coord_t'(by)};
    #1;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        logic wall, pad, ball_here;
        wall = (r == 0 || r == 15);
        pad  = (c == 0 && r >= p1 + 1 && r <= p1 + 5) || (c == 15 && r >= p2 + 1 && r <= p2 + 5);
        ball_here = (r == by && c == bx);
        checks++;
        if (RedPixels[r][c] !== (wall || ball_here) || GrnPixels[r][c] !== (wall || pad)) begin
          failures++;
          if (failures < 10)
            $display("FAIL P1=%0d P2=%0d ball=(%0d,%0d) pixel r%0d c%0d: red=%b grn=%b",
                     p1, p2, bx, by, r, c, RedPixels[r][c], GrnPixels[r][c]);
        end
      end
  endtask

  initial begin
    try(0, 9, 7, 7);
    try(9, 0, 1, 1);
    try(4, 4, 14, 14);
    for (int i = 0; i < 200; i++)
      try($urandom_range(0, 9), $urandom_range(0, 9), $urandom_range(0, 15), $urandom_range(1, 14));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
