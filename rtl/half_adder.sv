// half_adder: 1-bit half adder.
//
// s = a ^ b, c = a & b. It is the lowest cell of every ripple-carry adder
// whose carry in is the constant 0, where a full adder would be wasted.
// Combinational. Built from one XOR and one AND gate (this design's choice;
// only the cell's function is given for the original).
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_comb begin
    s = a ^ b;
    c = a & b;
  end

endmodule
