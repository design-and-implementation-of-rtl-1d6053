// 16-bit regular square-root carry-select adder block.
//
// Bits [1:0] are added by a single 2-bit ripple carry adder fed by cin. Above
// it sit four carry-select groups of 2, 3, 4 and 5 bits (bits [3:2], [6:4],
// [10:7] and [15:11]). Each group computes its sum for both possible incoming
// carries and selects one with the carry out of the group below, so the carry
// path through the block is the 2-bit RCA plus four muxes. The carry out of
// the 5-bit group is cout, which the wider adders pass to the next block.
// Group widths come from csla_pkg. Purely combinational.
module sqrt_csla16
  import csla_pkg::*;
(
  input  logic [BLOCK_W-1:0] a,
  input  logic [BLOCK_W-1:0] b,
  input  logic               cin,
  output logic [BLOCK_W-1:0] sum,
  output logic               cout
);

  // The 2-bit RCA and the groups must tile the block exactly.
  if (!split_ok()) begin : g_bad_split
    $error("csla_pkg: FIRST_RCA_W plus the GROUP_W widths must equal BLOCK_W");
  end

  // c[g] is the carry into group g; c[NUM_GROUPS] is the block's carry out.
  logic [NUM_GROUPS:0] c;

  rca #(.W(FIRST_RCA_W)) u_rca_lsb (
    .a   (a[FIRST_RCA_W-1:0]),
    .b   (b[FIRST_RCA_W-1:0]),
    .cin (cin),
    .s   (sum[FIRST_RCA_W-1:0]),
    .cout(c[0])
  );

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_group
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
