// One W-bit carry-select group.
//
// Two W-bit ripple carry adders add the same operand slice in parallel, one
// with its carry in tied to 0 and one with it tied to 1. When the real carry
// cin arrives from the group below it only has to drive the select of a
// csla_mux, which passes the matching sum and carry out. The delay from cin to
// the outputs is therefore one mux, whatever W is. Purely combinational.
module csla_group #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] sum0, sum1;
  logic         cout0, cout1;

  // Result for an incoming carry of 0.
  rca #(.W(W)) u_rca_c0 (.a(a), .b(b), .cin(1'b0), .s(sum0), .cout(cout0));
  // Result for an incoming carry of 1.
  rca #(.W(W)) u_rca_c1 (.a(a), .b(b), .cin(1'b1), .s(sum1), .cout(cout1));

  csla_mux #(.W(W)) u_mux (
    .sum0 (sum0),
    .cout0(cout0),
    .sum1 (sum1),
    .cout1(cout1),
    .sel  (cin),
    .sum  (s),
    .cout (cout)
  );

endmodule
