// csla_pkg: constants shared by the D-latch carry select adder.
//
// The 16-bit adder is split into five groups, least significant first. The
// lowest group (2 bits) is a plain ripple carry adder; the four upper groups
// are D-latch carry select groups. The 2-bit lowest group and the 2-bit group 2
// (bits 3:2) are given by the description; the sizes 3, 4 and 5 of the upper
// three groups are the usual square-root split of a 16-bit carry select adder,
// chosen here. With them the upper groups hold 5+7+9+11 = 32 latch bits.
package csla_pkg;

  localparam int unsigned WIDTH      = 16;
  localparam int unsigned NUM_GROUPS = 5;

  typedef int unsigned group_w_t [NUM_GROUPS];

  // Width of each group, group 1 (bits 1:0) first.
  localparam group_w_t GROUP_W = '{2, 2, 3, 4, 5};

  // Index of the least significant bit of group g (0-based).
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned lsb = 0;
    for (int unsigned i = 0; i < g; i++) lsb += GROUP_W[i];
    return lsb;
  endfunction

endpackage
