// ripple_carry_adder: W-bit ripple-carry adder.
//
// A chain of W one-bit cells, the carry of each feeding the next. The full
// adder cells are the carry-selected mux_full_adder. With HAS_CIN = 0 the
// adder adds with a constant carry in of 0, so its lowest cell is a
// half_adder and the cin port is not used; this is the adder of each
// carry-select group. With HAS_CIN = 1 every cell is a full adder and cin
// enters the lowest one; this is the adder of the least significant group.
//
// Ports: a, b operands; cin carry in (HAS_CIN = 1 only); s sum; cout carry out.
// Timing: combinational; the carry ripples through W cells.
//
// The half adder at bit 0 of the carry-in-0 adders and the use of the
// carry-selected cell follow the published design; building the cin variant
// from full adders only is this design's choice.
module ripple_carry_adder #(
  parameter int unsigned W       = 3,
  parameter bit          HAS_CIN = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  // c[i] is the carry into bit i; c[W] is the carry out.
  logic [W:0] c;

  generate
    if (HAS_CIN) begin : g_lsb_fa
      assign c[0] = cin;
      mux_full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(c[0]), .s(s[0]), .co(c[1]));
    end else begin : g_lsb_ha
      // The carry in is the constant 0: cin is deliberately left unconnected.
      logic unused_cin;
      assign unused_cin = cin;
      assign c[0]       = 1'b0;
      half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(s[0]), .c(c[1]));
    end

    for (genvar i = 1; i < W; i++) begin : g_fa
      mux_full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
    end
  endgenerate

  assign cout = c[W];

endmodule
