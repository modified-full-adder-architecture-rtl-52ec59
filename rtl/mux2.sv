// mux2: single-bit 2:1 multiplexer.
//
// y = d1 when sel is 1, otherwise d0. Purely combinational. It is the
// multiplexer cell of the carry-selected full adder, where the select is the
// full adder's carry input. The original cell is a pass-transistor
// multiplexer; here only its logic function is kept.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);

  always_comb y = sel ? d1 : d0;

endmodule
