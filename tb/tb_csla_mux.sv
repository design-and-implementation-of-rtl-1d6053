// Self-checking testbench for csla_mux at its default width (the 8:4 mux):
// applies every value of the two candidate sums, carries and the select, and
// checks that sel = 0 passes the carry-in-0 result and sel = 1 the other.
module tb_csla_mux;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W = 3;

  logic [W-1:0] sum0, sum1, sum;
  logic         cout0, cout1, sel, cout;
  int checks = 0, failures = 0;

  csla_mux dut (.sum0(sum0), .cout0(cout0), .sum1(sum1), .cout1(cout1),
                .sel(sel), .sum(sum), .cout(cout));

  initial begin
    for (int i = 0; i < (1 << (2 * W + 3)); i++) begin
      {sel, cout1, sum1, cout0, sum0} = (2 * W + 3)'(i);
      #1;
      checks++;
      if ({cout, sum} !== (sel ? {cout1, sum1} : {cout0, sum0})) begin
        failures++;
        $display("FAIL sel=%0b in0=%0b_%0b in1=%0b_%0b -> %0b_%0b",
                 sel, cout0, sum0, cout1, sum1, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
