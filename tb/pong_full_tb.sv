// pong_full_tb: one complete point of the pong top level at its default
// parameters.
//
// The game clock is bit 21 of the divider, one rising edge every 2^22
// CLOCK_50 cycles (about 84 ms), and the ball moves every fourth game clock
// (about 0.34 s), so this run covers a few hundred million CLOCK_50 cycles.
// The testbench resets the game, taps Player 1's up key once and checks that
// the paddle moves one row, then lets the ball fly with both paddles still
// until somebody scores. From the centre every serve direction reaches an
// edge column on a row neither paddle covers, so a point comes within
// seven ball moves. Checked: the field after reset, the paddle move,
// that the ball moves one diagonal step exactly every 4 * 2^22 CLOCK_50
// cycles, that the point appears on the right HEX display, and that the ball
// is served again from (7, 7).
module pong_full_tb;
  import pong_pkg::*;

  logic       CLOCK_50 = 0;
  logic [3:0] KEY;
  logic [9:0] SW;
  logic [6:0] HEX0, HEX1, HEX2, HEX3, HEX4, HEX5;
  pixels_t    RedPixels, GrnPixels;
  logic       LedClk, LedReset;

  pong dut (.*);

  localparam longint GAME_PERIOD = 64'd1 << 22;   // CLOCK_50 cycles

  always #10 CLOCK_50 = ~CLOCK_50;                 // 50 MHz

  longint cyc = 0;
  always @(posedge CLOCK_50) cyc++;

  int checks = 0, failures = 0;
  logic [6:0] hex_of [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  int bx, by;
  task automatic find_ball();
    for (int r = 1; r <= 14; r++)
      for (int c = 0; c < 16; c++)
        if (RedPixels[r][c]) begin bx = c; by = r; end
  endtask

  function automatic int paddle1();
    for (int r = 1; r <= 14; r++) if (GrnPixels[r][0]) return r - 1;
    return -1;
  endfunction

  // Wait for n rising edges of the game clock, then step to a point between
  // CLOCK_50 edges.
  task automatic game_clocks(int n);
    repeat (n) @(posedge dut.clk);
    @(negedge CLOCK_50);
  endtask

  initial begin
    #(64'd20 * GAME_PERIOD * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint last_move;
    int pbx, pby, moves;
    bit scored;
    KEY = '1;
    SW = '0;
    SW[9] = 1;
    game_clocks(2);
    SW[9] = 0;
    game_clocks(1);
    find_ball();
    checks++;
    if (bx != 7 || by != 7 || paddle1() != 4 || HEX0 !== hex_of[0] || HEX5 !== hex_of[0])
      fail("state after reset");

    // One tap on KEY[3] moves Player 1 up one row.
    KEY[3] = 0;
    game_clocks(1);
    KEY[3] = 1;
    game_clocks(3);
    checks++;
    if (paddle1() != 3) fail($sformatf("paddle 1 at %0d, want 3", paddle1()));

    // Let the ball fly until a point is scored.
    find_ball();
    pbx = bx; pby = by;
    last_move = -1;
    moves = 0;
    scored = 0;
    for (int g = 0; g < 300 && !scored; g++) begin
      game_clocks(1);
      find_ball();
      if (bx != pbx || by != pby) begin
        moves++;
        if (last_move >= 0) begin
          checks++;
          if (cyc - last_move != 4 * GAME_PERIOD)
            fail($sformatf("ball step after %0d cycles", cyc - last_move));
        end
        last_move = cyc;
        if (bx == 0 || bx == 15) begin
          scored = 1;
          game_clocks(1);
          checks++;
          if (bx == 15 ? (HEX0 !== hex_of[1] || HEX5 !== hex_of[0])
                       : (HEX5 !== hex_of[1] || HEX0 !== hex_of[0]))
            fail("score display after the point");
          find_ball();
          checks++;
          if (bx != 7 || by != 7) fail("ball not served from (7,7)");
          $display("point for player %0d after %0d ball moves", pbx == 14 ? 1 : 2, moves);
        end
        pbx = bx; pby = by;
      end
    end
    checks++;
    if (!scored) fail("no point scored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
