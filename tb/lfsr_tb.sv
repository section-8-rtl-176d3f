// lfsr_tb: checks the LFSR against a software model of the same polynomial.
//
// From whatever state the register starts in, each next value must be the
// previous one shifted left with bit9 ^ bit6 shifted in (or a 1 when the
// register is zero). After leaving zero the sequence must come back to its
// first state after exactly 1023 clocks, and no earlier, and all four values
// of the two low bits (the serve directions) must appear.
module lfsr_tb;
  logic       clk = 0;
  logic [9:0] q;
  int checks = 0, failures = 0;

  lfsr dut (.clk(clk), .q(q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] model_next(logic [9:0] s);
    if (s == 0) return 10'd1;
    return {s[8:0], s[9] ^ s[6]};
  endfunction

  initial begin
    logic [9:0] prev, first;
    int period;
    bit [3:0] seen;
    seen = '0;
    @(negedge clk);
    prev = q;
    // Step past a possible zero start.
    repeat (2) begin
      @(negedge clk);
      checks++;
      if (q !== model_next(prev)) failures++;
      prev = q;
    end
    first = q;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      checks++;
      if (q !== model_next(prev)) begin
        failures++;
        if (failures < 10) $display("FAIL step: %h -> %h, want %h", prev, q, model_next(prev));
      end
      checks++;
      if (q == 0) failures++;
      seen[q[1:0]] = 1'b1;
      prev = q;
    end while (q != first && period < 2000);
    checks++;
    if (period != 1023) begin
      failures++;
      $display("FAIL period %0d", period);
    end
    checks++;
    if (seen != 4'b1111) failures++;
    $display("period=%0d", period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
