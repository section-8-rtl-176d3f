// score_tb: checks point counting and win detection for one player.
//
// The ball position is driven directly. The counter must go up by one on
// each clock the ball is in the goal column (15 for this instance), ignore
// the ball anywhere else, including the other goal column, stop at the
// winning score of 7 with Win high, and clear on reset.
module score_tb;
  import pong_pkg::*;

  logic       clk = 0, reset;
  ball_pos_t  BallPos;
  logic [3:0] Score;
  logic       Win;
  int checks = 0, failures = 0;
  int model, n_points = 0, n_wins = 0;

  score dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int x, int y);
    BallPos = '{x: coord_t'(x), y: coord_t'(y)};
    @(posedge clk);
    #1;
    if (x == 15 && model < 7) begin
      model++;
      n_points++;
    end
    checks++;
    if (Score !== 4'(model) || Win !== (model == 7)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d: Score=%0d Win=%b want %0d", x, Score, Win, model);
    end
    if (Win) n_wins++;
  endtask

  initial begin
    BallPos = '{x: 4'd7, y: 4'd7};
    reset = 1;
    @(posedge clk); #1;
    reset = 0;
    model = 0;
    checks++;
    if (Score !== 0 || Win !== 0) failures++;
    for (int i = 0; i < 300; i++) begin
      int r;
      r = $urandom_range(0, 9);
      put(r == 0 ? 15 : (r == 1 ? 0 : $urandom_range(1, 14)), $urandom_range(1, 14));
    end
    reset = 1;
    @(posedge clk); #1;
    reset = 0;
    model = 0;
    checks++;
    if (Score !== 0 || Win !== 0) failures++;
    repeat (3) put(15, 3);
    checks++;
    if (n_wins == 0) failures++;
    $display("points=%0d win cycles=%0d", n_points, n_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
