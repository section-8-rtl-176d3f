// clock_divider_tb: checks the divided clocks.
//
// The counter must advance by one on every input clock edge, and over
// 5000 input cycles bit i must toggle exactly once every 2^i cycles for
// bits 0 .. 11 (counted from the value the counter started at).
module clock_divider_tb;
  logic        clock = 0;
  logic [31:0] divided_clocks;
  int checks = 0, failures = 0;

  clock_divider dut (.*);

  always #5 clock = ~clock;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] start, prev;
    int toggles [12];
    @(negedge clock);
    start = divided_clocks;
    prev = start;
    for (int n = 1; n <= 5000; n++) begin
      @(negedge clock);
      checks++;
      if (divided_clocks !== prev + 1) begin
        failures++;
        if (failures < 10) $display("FAIL %h -> %h", prev, divided_clocks);
      end
      for (int i = 0; i < 12; i++)
        if (divided_clocks[i] != prev[i]) toggles[i]++;
      prev = divided_clocks;
    end
    for (int i = 0; i < 12; i++) begin
      int want;
      want = int'(((start & ((32'd1 << i) - 1)) + 5000) >> i);
      checks++;
      if (toggles[i] != want) begin
        failures++;
        $display("FAIL bit %0d toggled %0d times, want %0d", i, toggles[i], want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
