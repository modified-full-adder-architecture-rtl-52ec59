// csla_group: one W-bit carry-select group with a binary-to-excess-1 converter.
//
// A conventional carry-select group adds its slice twice, with carry in 0 and
// with carry in 1, and picks one result once the real carry is known. Here
// only the carry-in-0 addition is made, by a ripple-carry adder; its (W+1)-bit
// result {carry, sum} is passed through a (W+1)-bit binary-to-excess-1
// converter, which yields the carry-in-1 result because that result is always
// exactly one larger. A 2(W+1):(W+1) multiplexer, selected by the carry from
// the group below, then picks the sum and the group's carry out.
//
// Ports: a, b operand slices; cin carry from the group below; s sum slice;
// cout carry to the group above.
// Timing: combinational. The adder and converter work while the carry from
// below is still on its way, so a group adds only one multiplexer to the
// path of that carry.
//
// The adder / converter / multiplexer arrangement follows the published
// design; widths are parameterised here so one module serves every group.
module csla_group #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] rca_s;
  logic         rca_c;
  logic [W:0]   r0;     // {carry, sum} for carry in 0
  logic [W:0]   r1;     // {carry, sum} for carry in 1
  logic [W:0]   y;

  ripple_carry_adder #(.W(W), .HAS_CIN(1'b0)) u_rca (
    .a(a), .b(b), .cin(1'b0), .s(rca_s), .cout(rca_c)
  );

  assign r0 = {rca_c, rca_s};

  bec #(.W(W + 1)) u_bec (.b(r0), .x(r1));

  carry_select_mux #(.W(W + 1)) u_mux (.d0(r0), .d1(r1), .sel(cin), .y(y));

  assign s    = y[W-1:0];
  assign cout = y[W];

endmodule
