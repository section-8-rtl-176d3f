// seg7_tb: checks all 16 inputs of the seven-segment decoder.
//
// The expected pattern is built from the list of lit segments of each digit
// (a = top, b = top right, c = bottom right, d = bottom, e = bottom left,
// f = top left, g = middle), written out as letters; inputs 10-15 must leave
// every segment dark. The outputs are active low.
module seg7_tb;
  logic [3:0] bcd;
  logic [6:0] leds;
  int checks = 0, failures = 0;

  seg7 dut (.*);

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] want;
    for (int v = 0; v < 16; v++) begin
      bcd = 4'(v);
      #1;
      want = '1;
      if (v < 10)
        for (int i = 0; i < lit[v].len(); i++)
          want[lit[v][i] - "a"] = 1'b0;
      checks++;
      if (leds !== want) begin
        failures++;
        $display("FAIL %0d: leds=%b want %b", v, leds, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
