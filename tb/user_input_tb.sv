// user_input_tb: checks the key synchroniser and press pulses.
//
// Random press and release patterns (active low, changing between clock
// edges) are applied to four keys. A model takes the key level sampled at
// each edge, delays it by two edges and expects pulse high for exactly the
// clock after a released-to-pressed change, i.e. one pulse per press however
// long the key is held. Presses that are held for many clocks must occur.
module user_input_tb;
  logic       clk = 0, reset;
  logic [3:0] key_n, pulse;
  int checks = 0, failures = 0, n_pulses = 0, n_long = 0;
  logic [3:0] s1, s2, s3;
  int held [4];

  user_input dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (reset) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= ~key_n; s2 <= s1; s3 <= s2;
    end
  end

  always @(negedge clk) if (!reset) begin
    checks++;
    if (pulse !== (s2 & ~s3)) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t pulse=%b want %b", $time, pulse, s2 & ~s3);
    end
    n_pulses += $countones(pulse);
  end

  initial begin
    key_n = '1;
    reset = 1;
    repeat (2) @(posedge clk);
    #3 reset = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      #($urandom_range(1, 9));
      for (int k = 0; k < 4; k++)
        if ($urandom_range(0, 5) == 0) begin
          if (!key_n[k] && held[k] > 5) n_long++;
          key_n[k] = ~key_n[k];
          held[k] = 0;
        end else
          held[k]++;
    end
    @(negedge clk);
    checks++;
    if (n_pulses == 0 || n_long == 0) failures++;
    $display("pulses=%0d long presses=%0d", n_pulses, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
