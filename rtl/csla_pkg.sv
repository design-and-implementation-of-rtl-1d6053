// Shared constants of the regular square-root carry-select adder (SQRT CSLA).
//
// The adder is built from 16-bit blocks. Inside a block the two least
// significant bits are added by a single 2-bit ripple carry adder, and the
// remaining 14 bits are split into carry-select groups whose widths grow by
// one bit per group: 2, 3, 4 and 5 bits (2 + 2 + 3 + 4 + 5 = 16). This growing
// group size is the "square root" organisation: each group's two candidate
// results are ready at about the time the carry arrives from the group below.
// The widths follow the 16-bit block of the design; group_lsb() gives the bit
// position at which a group starts inside the block, and split_ok() checks
// that the widths add up to the block width.
package csla_pkg;

  // Width of one regular SQRT CSLA block.
  localparam int unsigned BLOCK_W = 16;

  // Width of the plain ripple carry adder on the two least significant bits.
  localparam int unsigned FIRST_RCA_W = 2;

  // Number of carry-select groups above the first RCA, and their widths.
  localparam int unsigned NUM_GROUPS = 4;
  typedef int unsigned group_widths_t[NUM_GROUPS];
  localparam group_widths_t GROUP_W = '{2, 3, 4, 5};

  // Bit position, inside a 16-bit block, of the least significant bit of group g.
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned lsb;
    lsb = FIRST_RCA_W;
    for (int unsigned i = 0; i < NUM_GROUPS; i++) begin
      if (i < g) lsb += GROUP_W[i];
    end
    return lsb;
  endfunction

  // True when the first RCA and the groups tile the block exactly.
  function automatic bit split_ok();
    return group_lsb(NUM_GROUPS) == BLOCK_W;
  endfunction

endpackage
