// 32-bit regular square-root carry-select adder.
//
// Two 16-bit regular SQRT CSLAs side by side: the lower one adds bits
// [15:0] with the carry in cin, and its carry out is the carry in of the
// upper one, which adds bits [31:16]. The upper block's carry out is cout.
// Every group in both halves still precomputes both sums, so only the carry
// passes from one half to the other. Purely combinational.
module sqrt_csla32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout
);

  logic c_mid;  // carry out of the lower half, carry in of the upper half

  sqrt_csla16 u_lo (
    .a   (a[15:0]),
    .b   (b[15:0]),
    .cin (cin),
    .sum (sum[15:0]),
    .cout(c_mid)
  );

  sqrt_csla16 u_hi (
    .a   (a[31:16]),
    .b   (b[31:16]),
    .cin (c_mid),
    .sum (sum[31:16]),
    .cout(cout)
  );

endmodule
