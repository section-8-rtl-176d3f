// paddle: position of one player's paddle.
//
// Pos is the paddle's offset from row 1, so the paddle covers rows
// Pos+1 .. Pos+5. A one-clock pulse on up moves it one row towards the top
// wall and a pulse on down one row towards the bottom wall; the paddle stops
// at offset 0 (touching the top wall) and PADDLE_MAX (touching the bottom
// wall). Pulses on both at once cancel.
//
// The document gives the offset encoding and says the paddles move faster
// than the ball: here a paddle can move on every clock, the ball only on
// every fourth. The reset position (offset RESET_POS, the middle of the
// field) and the range 0 .. 9 are this design's choices.
//
// Timing: Pos is a register, updated on the rising clk edge; reset is
// synchronous and active high.
module paddle
  import pong_pkg::*;
#(
  parameter int unsigned RESET_POS = PADDLE_MAX / 2
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   up,
  input  logic   down,
  output coord_t Pos
);

  always_ff @(posedge clk) begin
    if (reset)
      Pos <= coord_t'(RESET_POS);
    else if (up && !down && Pos != '0)
      Pos <= Pos - 1'b1;
    else if (down && !up && Pos != coord_t'(PADDLE_MAX))
      Pos <= Pos + 1'b1;
  end

endmodule
