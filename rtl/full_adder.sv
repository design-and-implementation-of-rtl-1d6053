// One-bit full adder.
//
// Adds the operand bits a and b and the carry in cin, giving the sum bit s and
// the carry out cout, as in the usual truth table (s is the odd parity of the
// three inputs, cout is set when at least two of them are set). The half sum
// p = a XOR b is shared: s = p XOR cin and cout = (a AND b) OR (p AND cin).
// Both XORs are the AND-OR-INVERT xor_aoi cell. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic p;  // half sum a XOR b (carry propagate)

  xor_aoi u_xor_ab (.a(a), .b(b),   .y(p));
  xor_aoi u_xor_pc (.a(p), .b(cin), .y(s));

  always_comb cout = (a & b) | (p & cin);

endmodule
