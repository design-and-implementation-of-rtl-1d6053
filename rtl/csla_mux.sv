// Carry-select multiplexer: 2(W+1) inputs to W+1 outputs.
//
// Chooses between the two precomputed results of a carry-select group, each a
// W-bit sum with its carry out. sel = 0 passes the result computed for carry
// in 0 (sum0, cout0); sel = 1 passes the one computed for carry in 1 (sum1,
// cout1). With W = 2, 3, 4 and 5 this is the 6:3, 8:4, 10:5 and 12:6 mux of
// the 16-bit block; the default W = 3 is the 8:4 one. Purely combinational.
module csla_mux #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] sum0,
  input  logic         cout0,
  input  logic [W-1:0] sum1,
  input  logic         cout1,
  input  logic         sel,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb begin
    if (sel) begin
      sum  = sum1;
      cout = cout1;
    end else begin
      sum  = sum0;
      cout = cout0;
    end
  end

endmodule
