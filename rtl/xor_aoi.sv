// Two-input exclusive OR written in AND-OR-INVERT form.
//
// y = (a AND NOT b) OR (NOT a AND b). Two inverters feed two AND gates, which
// feed one OR gate: three gate levels, the unit of delay and area used to cost
// the adders of this design. The full adder uses it for both of its XORs.
// Purely combinational; no clock.
module xor_aoi (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_n, b_n;    // inverter level
  logic a_bn, an_b;  // AND level

  always_comb begin
    a_n  = ~a;
    b_n  = ~b;
    a_bn = a & b_n;
    an_b = a_n & b;
    y    = a_bn | an_b;  // OR level
  end

endmodule
