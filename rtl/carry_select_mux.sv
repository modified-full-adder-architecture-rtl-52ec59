// carry_select_mux: 2W:W multiplexer of a carry-select group.
//
// Chooses the group's {carry, sum} word: d0 (from the ripple-carry adder with
// carry in 0) when sel is 0, d1 (from the binary-to-excess-1 converter, i.e.
// the carry-in-1 result) when sel is 1. sel is the carry arriving from the
// group below. The top bit of the output is the group's carry out.
// Combinational. Input order (0 = adder, 1 = converter) follows the published
// structure; the behavioural select is this design's choice.
module carry_select_mux #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
