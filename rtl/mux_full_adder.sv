// mux_full_adder: 1-bit full adder whose outputs are selected by the carry in.
//
// With ci = 0 a full adder's sum is a^b and its carry a&b; with ci = 1 the sum
// is the XNOR of a and b and the carry is a|b. The cell therefore computes
// XOR/XNOR and AND/OR of the operands in parallel and lets two multiplexers,
// both driven by ci, pick the sum and the carry. No internally generated
// signal drives a select input, so the path from ci to the outputs is a
// single multiplexer: this is the point of the cell, since in a ripple chain
// the carry is the late-arriving signal.
//
// Ports: a, b operand bits; ci carry in; s sum; co carry out.
// Timing: combinational.
//
// The block structure (XOR/XNOR, AND/OR, two multiplexers selected by ci)
// follows the published cell. Its circuit styles (DPL gates, pass-transistor
// multiplexer) are transistor-level and are not represented here.
module mux_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic x_xor, x_xnor;   // XOR / XNOR block
  logic g_and, g_or;     // AND / OR block

  always_comb begin
    x_xor  = a ^ b;
    x_xnor = ~x_xor;
    g_and  = a & b;
    g_or   = a | b;
  end

  mux2 u_sum_mux   (.d0(x_xor), .d1(x_xnor), .sel(ci), .y(s));
  mux2 u_carry_mux (.d0(g_and), .d1(g_or),   .sel(ci), .y(co));

endmodule
