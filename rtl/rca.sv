// W-bit ripple carry adder.
//
// A chain of W full adders: the carry out of bit i is the carry in of bit
// i + 1, and the carry out of the top bit is cout. Compact but slow: the
// carry may have to travel through all W stages. The default width of 4 is
// the four-stage chain used to explain the adder; the carry-select adder
// instantiates it at 2 to 5 bits. Purely combinational.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
