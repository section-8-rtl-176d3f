// ball_tb: checks ball movement, speed, serving and hold.
//
// The testbench plays the collision detector: NewDir keeps the ball's
// vertical direction, reversed on rows 1 and 14, and takes its horizontal
// direction from a variable the test sets. A reference model tracks the
// position, direction and move counter. Checks, every clock:
//   * position and direction match the model;
//   * moves are exactly TICK_MAX + 1 = 4 clocks apart;
//   * after reset and after the ball reaches column 0 or 15 (for one clock)
//     it is back at (7, 7) with the direction taken from the LFSR's low
//     bits;
//   * with hold high the ball stays put.
// Goals on both sides, all four serve directions and a hold must occur.
module ball_tb;
  import pong_pkg::*;

  logic      clk = 0, reset, hold;
  dir_t      NewDir;
  ball_pos_t BallPos;
  dir_t      BallDir;

  int checks = 0, failures = 0;
  int n_goal_left = 0, n_goal_right = 0, n_moves = 0, n_hold = 0;
  int last_move = -1, cycle = 0;
  bit [3:0] serve_seen = '0;
  logic hwest;

  ball dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Testbench stand-in for the collision detector.
  always_comb begin
    logic s;
    s = BallDir[1];
    if (BallPos.y == 4'd1)  s = 1'b1;
    if (BallPos.y == 4'd14) s = 1'b0;
    NewDir = dir_t'({s, hwest});
  end

  // Reference model, updated at each rising edge from pre-edge values.
  int mx, my, mcount;
  logic [1:0] mdir;
  always @(posedge clk) begin
    logic [1:0] rnd;
    rnd = dut.u_lfsr.q[1:0];
    cycle++;
    if (reset || mx == 0 || mx == 15) begin
      if (!reset && mx == 0)  n_goal_left++;
      if (!reset && mx == 15) n_goal_right++;
      if (!reset) serve_seen[rnd] = 1'b1;
      mx = 7; my = 7; mdir = rnd; mcount = 0;
    end else if (!hold) begin
      if (mcount == 3) begin
        mdir = NewDir;
        mx += NewDir[0] ? -1 : 1;
        my += NewDir[1] ? 1 : -1;
        n_moves++;
        checks++;
        if (last_move >= 0 && cycle - last_move != 4) begin
          failures++;
          $display("FAIL move spacing %0d", cycle - last_move);
        end
        last_move = cycle;
        mcount = 0;
      end else
        mcount++;
    end else
      n_hold++;
  end

  always @(negedge clk) begin
    checks++;
    if (BallPos.x !== coord_t'(mx) || BallPos.y !== coord_t'(my) || BallDir !== dir_t'(mdir)) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t pos=(%0d,%0d) dir=%0d want (%0d,%0d) %0d",
                 $time, BallPos.x, BallPos.y, BallDir, mx, my, mdir);
    end
  end

  initial begin
    reset = 1; hold = 0; hwest = 1;
    mx = 7; my = 7; mdir = 0; mcount = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    // Play several goals on each side; spacing restarts after each serve.
    for (int g = 0; g < 24; g++) begin
      hwest = g[0];
      last_move = -1;
      wait (BallPos.x == 4'd0 || BallPos.x == 4'd15);
      @(posedge clk);
      @(negedge clk);
      last_move = -1;
    end
    // Hold: nothing moves for 20 clocks.
    @(negedge clk);
    hold = 1;
    repeat (20) @(negedge clk);
    hold = 0;
    last_move = -1;
    // Reset in mid-flight.
    repeat (9) @(negedge clk);
    reset = 1;
    @(negedge clk);
    reset = 0;
    last_move = -1;
    repeat (10) @(negedge clk);
    checks++;
    if (n_goal_left == 0 || n_goal_right == 0 || serve_seen != 4'b1111 || n_hold < 20) failures++;
    $display("moves=%0d goals left=%0d right=%0d serves seen=%b hold cycles=%0d",
             n_moves, n_goal_left, n_goal_right, serve_seen, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
