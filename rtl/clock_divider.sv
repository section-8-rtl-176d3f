// clock_divider: a set of slower clocks from the 50 MHz board clock.
//
// A 32-bit up-counter advances on every rising edge of clock. Bit i of
// divided_clocks toggles every 2^i edges, so it is a square wave of
// 50 MHz / 2^(i+1): bit 14 is about 1.5 kHz, bit 21 about 12 Hz. The game
// picks one bit as its clock so that it runs at human speed.
//
// The counter has no reset: its value is never used, only its bits' rates,
// and resetting it with the game reset would stop the clock the game's
// synchronous reset needs.
module clock_divider (
  input  logic        clock,
  output logic [31:0] divided_clocks
);

  always_ff @(posedge clock)
    divided_clocks <= divided_clocks + 1'b1;

endmodule
