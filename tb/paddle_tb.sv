// paddle_tb: checks paddle movement against a reference position.
//
// After reset the paddle must sit at offset 4. A mix of directed and random
// up/down pulses is applied; a model position moves one row per pulse,
// ignores simultaneous pulses and stops at 0 and 9. Both stops must be
// reached and pressed against, and the position is compared every clock.
module paddle_tb;
  import pong_pkg::*;

  logic   clk = 0, reset, up, down;
  coord_t Pos;
  int checks = 0, failures = 0;
  int model, n_top = 0, n_bot = 0;

  paddle dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic u, logic d);
    up = u;
    down = d;
    @(posedge clk);
    #1;
    if (u && !d) begin
      if (model == 0) n_top++; else model--;
    end else if (d && !u) begin
      if (model == 9) n_bot++; else model++;
    end
    checks++;
    if (Pos !== coord_t'(model)) begin
      failures++;
      if (failures < 10) $display("FAIL up=%b down=%b: Pos=%0d want %0d", u, d, Pos, model);
    end
  endtask

  initial begin
    up = 0; down = 0; reset = 1;
    @(posedge clk); #1;
    reset = 0;
    model = 4;
    checks++;
    if (Pos !== 4'd4) failures++;
    repeat (12) step(1, 0);
    repeat (3) step(1, 1);
    repeat (14) step(0, 1);
    repeat (2) step(0, 0);
    repeat (400) step(1'($urandom), 1'($urandom));
    // Reset from an off-centre position.
    step(1, 0);
    reset = 1;
    @(posedge clk); #1;
    reset = 0;
    model = 4;
    checks++;
    if (Pos !== 4'd4) failures++;
    checks++;
    if (n_top == 0 || n_bot == 0) failures++;
    $display("presses against top=%0d bottom=%0d", n_top, n_bot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
