// csla_pkg: shared constants of the 16-bit square-root carry-select adder.
//
// The adder is cut into five groups whose widths grow towards the most
// significant end (2, 2, 3, 4 and 5 bits, i.e. bits 1:0, 3:2, 6:4, 10:7 and
// 15:11). Group 0 is a plain ripple-carry adder fed by the adder's carry in;
// groups 1 to 4 are carry-select groups built from a ripple-carry adder with
// carry in 0, a binary-to-excess-1 converter and a multiplexer. The group
// widths and their bit ranges are those of the published structure.
// group_lsb() gives the position of a group's lowest bit.
package csla_pkg;

  localparam int unsigned WIDTH      = 16;
  localparam int unsigned NUM_GROUPS = 5;

  typedef int unsigned group_w_t [NUM_GROUPS];
  localparam group_w_t GROUP_W = '{2, 2, 3, 4, 5};

  // Lowest bit position of group g (sum of the widths of the groups below).
  function automatic int unsigned group_lsb(input int unsigned g);
    int unsigned lsb = 0;
    for (int unsigned i = 0; i < g; i++) lsb += GROUP_W[i];
    return lsb;
  endfunction

endpackage
