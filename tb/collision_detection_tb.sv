// collision_detection_tb: exhaustive check of the bounce logic.
//
// Every in-field ball position (x and y in 1 .. 14), every direction and
// every pair of paddle offsets (0 .. 9) is applied. The expected direction
// comes from a geometric model: take the step the ball would make; if it
// lands on a wall row, reverse the vertical step; if the corrected step lands
// in an edge column on a row that the paddle there covers, reverse the
// horizontal step. Counts of wall, paddle and corner bounces must all be
// non-zero.
module collision_detection_tb;
  import pong_pkg::*;

  coord_t    P1Pos, P2Pos;
  ball_pos_t BallPos;
  dir_t      BallDir, NewDir;

  int checks = 0, failures = 0;
  int n_wall = 0, n_paddle = 0, n_corner = 0;

  collision_detection dut (.*);

  function automatic logic [1:0] model(int x, int y, int d, int p1, int p2);
    int dx, dy, nx, ny;
    dy = d[1] ? 1 : -1;
    dx = d[0] ? -1 : 1;
    ny = y + dy;
    if (ny <= 0 || ny >= 15) begin
      dy = -dy;
      ny = y + dy;
    end
    nx = x + dx;
    if (nx == 0  && ny > p1 && ny <= p1 + 5) dx = -dx;
    if (nx == 15 && ny > p2 && ny <= p2 + 5) dx = -dx;
    return {dy > 0, dx < 0};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int p1 = 0; p1 <= 9; p1++)
      for (int p2 = 0; p2 <= 9; p2++)
        for (int x = 1; x <= 14; x++)
          for (int y = 1; y <= 14; y++)
            for (int d = 0; d < 4; d++) begin
              P1Pos = coord_t'(p1);
              P2Pos = coord_t'(p2);
              BallPos = '{x: coord_t'(x), y: coord_t'(y)};
              BallDir = dir_t'(d);
              #1;
              exp = model(x, y, d, p1, p2);
              checks++;
              if (NewDir !== dir_t'(exp)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL P1=%0d P2=%0d pos=(%0d,%0d) dir=%0d: got %0d want %0d",
                           p1, p2, x, y, d, NewDir, exp);
              end
              if (exp[1] != d[1]) n_wall++;
              if (exp[0] != d[0]) n_paddle++;
              if (exp[1] != d[1] && exp[0] != d[0]) n_corner++;
            end
    checks++;
    if (n_wall == 0 || n_paddle == 0 || n_corner == 0) failures++;
    $display("wall bounces=%0d paddle bounces=%0d corner bounces=%0d", n_wall, n_paddle, n_corner);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
