// pong_tb: end-to-end game test of the pong top level.
//
// The game runs on bit GAME_CLOCK = 1 of the clock divider (one game clock
// every four CLOCK_50 cycles) so that whole games fit in a short run; every
// other parameter keeps its default. The testbench sees the design only
// through its ports: it reads the ball and paddles back from RedPixels and
// GrnPixels and the scores from HEX0 and HEX5, and plays with KEY and SW[9].
//
// Every game clock it checks that the field is well formed (orange walls,
// one red ball pixel, two five-row green paddles) and follows the ball:
//   * a ball that leaves column 1 (14) back towards the middle must have
//     moved onto a row covered by Player 1's (2's) paddle: a paddle bounce;
//   * a ball entering column 0 (15) must have missed the paddle there, and
//     scores for Player 2 (1): the HEX display must show the new score and
//     the ball must be served from (7, 7) on the next clock;
//   * a ball that leaves row 1 or 14 is a wall bounce;
//   * after 7 points the ball must stay at (7, 7) until reset.
// Scripted players move the paddles: a tracking player keeps its paddle on
// the ball and an avoiding player moves it away. The run covers: key held
// down (moves once), paddles pressed against both walls, long rallies, points
// for both players, a win, resets mid-game. Each of these mechanisms is
// counted and a count of zero is a failure.
module pong_tb;
  import pong_pkg::*;

  logic       CLOCK_50 = 0;
  logic [3:0] KEY;
  logic [9:0] SW;
  logic [6:0] HEX0, HEX1, HEX2, HEX3, HEX4, HEX5;
  pixels_t    RedPixels, GrnPixels;
  logic       LedClk, LedReset;

  pong #(.GAME_CLOCK(1)) dut (.*);

  always #5 CLOCK_50 = ~CLOCK_50;

  int checks = 0, failures = 0;
  int n_paddle_bounce = 0, n_wall_bounce = 0, n_p1_point = 0, n_p2_point = 0;
  int n_serve = 0, n_win_hold = 0, n_held_key = 0, n_clamp_top = 0, n_clamp_bot = 0;
  int n_moves = 0, n_resets = 0;

  // Expected HEX patterns (active low) for digits 0-9.
  logic [6:0] hex_of [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  // Scripted players: 0 = idle, 1 = track the ball, 2 = avoid the ball.
  int mode [2];
  int phase [2];
  int score_p [2];

  int bx, by, p1, p2;          // decoded at the current game clock
  int pbx, pby, pp1, pp2;      // at the previous game clock
  bit have_prev = 0;
  bit after_goal = 0;
  bit won = 0;
  bit started = 0;             // set once the first reset has been applied

  logic game_clk;
  assign game_clk = dut.divided_clocks[1];

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  // Decode one paddle column: returns the offset or -1 if malformed.
  function automatic int paddle_at(int col);
    int first, n;
    first = -1; n = 0;
    for (int r = 1; r <= 14; r++)
      if (GrnPixels[r][col]) begin
        if (first < 0) first = r;
        n++;
      end
    if (n != 5 || first < 1) return -1;
    for (int r = first; r < first + 5; r++) if (!GrnPixels[r][col]) return -1;
    return first - 1;
  endfunction

  task automatic decode();
    int n;
    n = 0;
    checks++;
    if (RedPixels[0] !== '1 || GrnPixels[0] !== '1 || RedPixels[15] !== '1 || GrnPixels[15] !== '1)
      fail("walls not orange");
    for (int r = 1; r <= 14; r++)
      for (int c = 0; c < 16; c++) begin
        if (RedPixels[r][c]) begin n++; bx = c; by = r; end
        if (GrnPixels[r][c] && c != 0 && c != 15) fail("green pixel off the paddle columns");
      end
    checks++;
    if (n != 1) fail($sformatf("%0d red pixels in the field", n));
    p1 = paddle_at(0);
    p2 = paddle_at(15);
    checks++;
    if (p1 < 0 || p2 < 0) fail("malformed paddle");
  endtask

  function automatic bit covers(int pos, int row);
    return row >= pos + 1 && row <= pos + 5;
  endfunction

  // Follow the game at each falling game clock edge.
  always @(negedge game_clk) if (started) begin
    decode();
    if (SW[9]) begin
      have_prev = 0;
      after_goal = 0;
    end else if (have_prev) begin
      if (after_goal) begin
        checks++;
        if (bx != 7 || by != 7) fail($sformatf("not served from (7,7): (%0d,%0d)", bx, by));
        else n_serve++;
        after_goal = 0;
      end else if (bx != pbx || by != pby) begin
        n_moves++;
        checks++;
        if ((bx - pbx) * (bx - pbx) != 1 || (by - pby) * (by - pby) != 1)
          fail($sformatf("ball jumped (%0d,%0d)->(%0d,%0d)", pbx, pby, bx, by));
        if (won) fail("ball moved after a win");
        if ((pby == 1 || pby == 14) && by != pby) n_wall_bounce++;
        if (pbx == 1 && bx == 2) begin
          n_paddle_bounce++;
          checks++;
          if (!covers(pp1, by)) fail("bounced off player 1 without paddle");
        end
        if (pbx == 14 && bx == 13) begin
          n_paddle_bounce++;
          checks++;
          if (!covers(pp2, by)) fail("bounced off player 2 without paddle");
        end
        if (bx == 0 || bx == 15) begin
          checks++;
          if (bx == 0 && covers(pp1, by)) fail("ball passed through player 1's paddle");
          if (bx == 15 && covers(pp2, by)) fail("ball passed through player 2's paddle");
          if (bx == 0) begin score_p[1]++; n_p2_point++; end
          else begin score_p[0]++; n_p1_point++; end
          after_goal = 1;
        end
      end else if (won)
        n_win_hold++;
      // The score display follows one game clock behind the goal.
      if (!after_goal) begin
        checks++;
        if (HEX0 !== hex_of[score_p[0]] || HEX5 !== hex_of[score_p[1]])
          fail($sformatf("HEX0/HEX5 wrong for score %0d-%0d", score_p[0], score_p[1]));
        if (score_p[0] == 7 || score_p[1] == 7) won = 1;
      end
      checks++;
      if (HEX1 !== '1 || HEX2 !== '1 || HEX3 !== '1 || HEX4 !== '1) fail("HEX1-4 not dark");
    end
    pbx = bx; pby = by; pp1 = p1; pp2 = p2;
    have_prev = !SW[9];
  end

  // Scripted players drive the keys from the falling game clock edge.
  always @(negedge game_clk) begin
    for (int p = 0; p < 2; p++) begin
      int pos, target;
      logic up, down;
      pos = (p == 0) ? p1 : p2;
      up = 0; down = 0;
      if (mode[p] != 0) begin
        if (phase[p] == 0) begin
          if (mode[p] == 1) target = by - 3;
          else target = (by > 7) ? 0 : 9;
          if (target < 0) target = 0;
          if (target > 9) target = 9;
          if (pos < target) down = 1;
          if (pos > target) up = 1;
          if (up || down) phase[p] = 3;
        end
        if (phase[p] > 0) begin
          if (phase[p] == 3) begin
            KEY[3 - 2 * p] = ~up;
            KEY[2 - 2 * p] = ~down;
          end else begin
            KEY[3 - 2 * p] = 1'b1;
            KEY[2 - 2 * p] = 1'b1;
          end
          phase[p]--;
        end
      end
    end
  end

  task automatic clocks(int n);
    repeat (n) @(negedge game_clk);
  endtask

  task automatic do_reset();
    SW[9] = 1;
    clocks(1);
    started = 1;
    clocks(2);
    SW[9] = 0;
    score_p[0] = 0; score_p[1] = 0;
    won = 0;
    n_resets++;
    @(negedge game_clk);
    #1;
    checks++;
    if (p1 != 4 || p2 != 4 || HEX0 !== hex_of[0] || HEX5 !== hex_of[0])
      fail("state after reset");
  endtask

  // One press of a key for one game clock, then release.
  task automatic tap(int k);
    KEY[k] = 0;
    clocks(1);
    KEY[k] = 1;
    clocks(2);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start_pos;
    KEY = '1;
    SW = '0;
    SW[9] = 1;                 // in reset from time zero
    mode[0] = 0; mode[1] = 0;
    phase[0] = 0; phase[1] = 0;
    score_p[0] = 0; score_p[1] = 0;
    clocks(2);
    do_reset();

    // A key held for ten clocks moves its paddle once.
    start_pos = p1;
    KEY[2] = 0;
    clocks(10);
    KEY[2] = 1;
    clocks(4);
    checks++;
    if (p1 != start_pos + 1) fail($sformatf("held key moved paddle %0d -> %0d", start_pos, p1));
    else n_held_key++;

    // Press player 1 against the top wall and player 2 against the bottom.
    repeat (8) tap(3);
    repeat (8) tap(0);
    clocks(3);
    checks++;
    if (p1 != 0 || p2 != 9) fail($sformatf("clamp: p1=%0d p2=%0d", p1, p2));
    else begin n_clamp_top++; n_clamp_bot++; end
    // And the other way round.
    repeat (11) tap(2);
    repeat (11) tap(1);
    clocks(3);
    checks++;
    if (p1 != 9 || p2 != 0) fail($sformatf("clamp: p1=%0d p2=%0d", p1, p2));
    else begin n_clamp_top++; n_clamp_bot++; end

    // Rallies between two tracking players.
    do_reset();
    mode[0] = 1; mode[1] = 1;
    clocks(1500);

    // Player 1 misses until player 2 has three points.
    mode[0] = 2;
    for (int i = 0; i < 20000 && score_p[1] < 3 && !won; i++) clocks(1);
    // Then player 2 misses until player 1 wins.
    mode[0] = 1; mode[1] = 2;
    for (int i = 0; i < 40000 && !won; i++) clocks(1);
    clocks(60);

    // Reset after the win restarts the game.
    mode[0] = 0; mode[1] = 0;
    KEY = '1;
    do_reset();
    clocks(40);

    checks++;
    if (n_paddle_bounce == 0 || n_wall_bounce == 0 || n_p1_point == 0 || n_p2_point == 0 ||
        n_serve == 0 || n_win_hold < 50 || n_held_key == 0 || n_clamp_top < 2 || n_clamp_bot < 2)
      fail("a mechanism was never exercised");
    $display("moves=%0d paddle_bounces=%0d wall_bounces=%0d p1_points=%0d p2_points=%0d serves=%0d",
             n_moves, n_paddle_bounce, n_wall_bounce, n_p1_point, n_p2_point, n_serve);
    $display("win_hold_clocks=%0d held_key=%0d clamp_top=%0d clamp_bottom=%0d resets=%0d",
             n_win_hold, n_held_key, n_clamp_top, n_clamp_bot, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
