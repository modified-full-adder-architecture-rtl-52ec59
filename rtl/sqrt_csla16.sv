// sqrt_csla16: 16-bit square-root carry-select adder with BEC groups.
//
// sum + cout = a + b + cin. The 16 bits are split into five groups of 2, 2,
// 3, 4 and 5 bits (bits 1:0, 3:2, 6:4, 10:7, 15:11). Group 0 is a 2-bit
// ripple-carry adder that takes cin. Each higher group (csla_group) computes
// its slice for carry in 0 with a ripple-carry adder, derives the carry-in-1
// result with a binary-to-excess-1 converter instead of a second adder, and
// selects between the two with the carry from the group below. Group widths
// grow by roughly one bit per group so that each group's local result is
// ready about when the carry reaches it ("square root" sizing): the carry
// chain from cin to cout crosses group 0 and then only one multiplexer per
// group. All full adder cells are the carry-selected mux_full_adder.
//
// Ports: a, b 16-bit operands; cin carry in; sum 16-bit sum; cout carry out.
// Timing: purely combinational; no clock or reset.
//
// The grouping, the converter-based groups and the full adder cell follow
// the published design; the design has no registers and none are added.
module sqrt_csla16
  import csla_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // c[g] is the carry into group g; c[NUM_GROUPS] is the adder's carry out.
  logic [NUM_GROUPS:0] c;

  // The group widths must tile the adder exactly.
  if (group_lsb(NUM_GROUPS) != WIDTH) begin : g_width_check
    $error("csla_pkg: group widths do not add up to WIDTH");
  end

  assign c[0] = cin;

  ripple_carry_adder #(.W(GROUP_W[0]), .HAS_CIN(1'b1)) u_group0 (
    .a   (a[GROUP_W[0]-1:0]),
    .b   (b[GROUP_W[0]-1:0]),
    .cin (c[0]),
    .s   (sum[GROUP_W[0]-1:0]),
    .cout(c[1])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_group
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned GW  = GROUP_W[g];

    csla_group #(.W(GW)) u_group (
      .a   (a[LSB +: GW]),
      .b   (b[LSB +: GW]),
      .cin (c[g]),
      .s   (sum[LSB +: GW]),
      .cout(c[g+1])
    );
  end

  assign cout = c[NUM_GROUPS];

endmodule
