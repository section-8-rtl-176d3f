// user_input: synchroniser and pulse generator for the push buttons.
//
// Each of the N buttons is active low, as the board's KEY inputs are. A
// button first passes two flip-flops in series, so a press that arrives at
// any time is seen as a clean level on the game clock; a third flip-flop
// holds the previous synchronised level, and pulse is high for the one
// clock in which that level goes from released to pressed. Holding a button
// therefore moves a paddle only once; it must be released and pressed again.
//
// The document names the synchronisers and pulse generators; the two-stage
// synchroniser and the press-edge pulse are this design's choices.
//
// Timing: pulse comes two to three clocks after the press, for one clock.
// reset is synchronous, active high, and sets every stage to released.
module user_input #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] key_n,
  output logic [N-1:0] pulse
);

  logic [N-1:0] meta, pressed, prev;

  always_ff @(posedge clk) begin
    if (reset) begin
      meta    <= '0;
      pressed <= '0;
      prev    <= '0;
    end else begin
      meta    <= ~key_n;
      pressed <= meta;
      prev    <= pressed;
    end
  end

  assign pulse = pressed & ~prev;

endmodule
