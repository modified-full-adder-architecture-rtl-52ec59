// bec: W-bit binary to excess-1 converter (adds 1, modulo 2^W).
//
// The lowest bit is inverted; every other bit is XORed with the AND of all
// bits below it, the AND terms forming a chain (b0&b1, then that &b2, ...).
// For W = 4 that is one inverter, two AND gates and three XOR gates. In the
// carry-select group it turns the {carry, sum} word of the ripple-carry adder
// with carry in 0 into the word that carry in 1 would have given, replacing a
// second ripple-carry adder.
//
// Ports: b input word; x = b + 1 (the all-ones word wraps to zero).
// Timing: combinational; W-2 AND gates and one XOR on the longest path.
//
// The gate structure follows the published 4-bit converter; its extension to
// any width W is this design's own.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);

  // p[i] is the AND of b[i-1:0]; p[0] is unused.
  logic [W-1:0] p;

  always_comb begin
    p    = '0;
    x[0] = ~b[0];
    if (W > 1) begin
      p[1] = b[0];
      for (int unsigned i = 2; i < W; i++) p[i] = p[i-1] & b[i-1];
      for (int unsigned i = 1; i < W; i++) x[i] = b[i] ^ p[i];
    end
  end

endmodule
