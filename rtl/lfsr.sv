// lfsr: free-running Fibonacci linear-feedback shift register.
//
// Shifts left every clock; the new bit 0 is the XOR of bits 9 and 6
// (polynomial x^10 + x^7 + 1), which steps through all 1023 non-zero
// states. The register has no reset on purpose: the game's reset must not
// restart it, or the serve after every reset would go the same way. An
// all-zero state, the only one outside the cycle (for instance at power up),
// is left on the next clock because a 1 is shifted in whenever the register
// is zero; every other state behaves as a plain LFSR.
//
// The document asks only for an LFSR whose output picks the serve
// direction; its width and taps are this design's choice. q is the
// register itself, one clock per new value.
module lfsr #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  output logic [WIDTH-1:0] q
);

  logic feedback;

  always_comb begin
    feedback = q[WIDTH-1] ^ q[WIDTH-4];
    if (q == '0) feedback = 1'b1;
  end

  always_ff @(posedge clk)
    q <= {q[WIDTH-2:0], feedback};

endmodule
