// seg7: decimal digit to seven-segment display.
//
// Combinational. Digits 0-9 light the usual segments; other inputs leave
// the display dark. Bit i of leds drives segment i (0 = a, top, through
// 6 = g, middle), active low as on the board's HEX displays.
module seg7 (
  input  logic [3:0] bcd,
  output logic [6:0] leds
);

  always_comb begin
    unique case (bcd)
      //                 gfedcba
      4'd0:    leds = ~7'b0111111;
      4'd1:    leds = ~7'b0000110;
      4'd2:    leds = ~7'b1011011;
      4'd3:    leds = ~7'b1001111;
      4'd4:    leds = ~7'b1100110;
      4'd5:    leds = ~7'b1101101;
      4'd6:    leds = ~7'b1111101;
      4'd7:    leds = ~7'b0000111;
      4'd8:    leds = ~7'b1111111;
      4'd9:    leds = ~7'b1101111;
      default: leds = 7'b1111111;
    endcase
  end

endmodule
