// 64-bit regular square-root carry-select adder.
//
// Two 32-bit regular SQRT CSLAs side by side: the lower one adds bits
// [31:0] with the carry in cin, and its carry out is the carry in of the
// upper one, which adds bits [63:32]. The upper block's carry out is cout.
// Every group in both halves still precomputes both sums, so only the carry
// passes from one half to the other. Purely combinational.
module sqrt_csla64 (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        cin,
  output logic [63:0] sum,
  output logic        cout
);

  logic c_mid;  // carry out of the lower half, carry in of the upper half

  sqrt_csla32 u_lo (
    .a   (a[31:0]),
    .b   (b[31:0]),
    .cin (cin),
    .sum (sum[31:0]),
    .cout(c_mid)
  );

  sqrt_csla32 u_hi (
    .a   (a[63:32]),
    .b   (b[63:32]),
    .cin (c_mid),
    .sum (sum[63:32]),
    .cout(cout)
  );

endmodule
