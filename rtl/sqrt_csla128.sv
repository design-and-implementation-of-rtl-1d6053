// 128-bit regular square-root carry-select adder (top of the design).
//
// Adds two 128-bit operands and a carry in, giving a 128-bit sum and a carry
// out, in one combinational pass (no clock, no registers). The word is eight
// 16-bit regular SQRT CSLA blocks in a carry chain, built as two 64-bit
// halves, each of two 32-bit adders, each of two 16-bit blocks. Inside every
// block a 2-bit ripple adder is followed by carry-select groups of 2, 3, 4 and
// 5 bits that precompute their sums for both carry values. The block layout,
// the doubling from 16 to 128 bits and the plain carry hand-over between
// halves follow the published architecture; the gate form of the full adder
// and the mux, and the absence of registers, are choices of this design.
//
// Two 64-bit regular SQRT CSLAs side by side: the lower one adds bits
// [63:0] with the carry in cin, and its carry out is the carry in of the
// upper one, which adds bits [127:64]. The upper block's carry out is cout.
// Every group in both halves still precomputes both sums, so only the carry
// passes from one half to the other. Purely combinational.
module sqrt_csla128 (
  input  logic [127:0] a,
  input  logic [127:0] b,
  input  logic         cin,
  output logic [127:0] sum,
  output logic         cout
);

  logic c_mid;  // carry out of the lower half, carry in of the upper half

  sqrt_csla64 u_lo (
    .a   (a[63:0]),
    .b   (b[63:0]),
    .cin (cin),
    .sum (sum[63:0]),
    .cout(c_mid)
  );

  sqrt_csla64 u_hi (
    .a   (a[127:64]),
    .b   (b[127:64]),
    .cin (c_mid),
    .sum (sum[127:64]),
    .cout(cout)
  );

endmodule
