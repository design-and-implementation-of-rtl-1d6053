// Self-checking testbench for rca at its default width of 4: applies every
// combination of a, b and cin (512 vectors) and compares {cout, s} with the
// integer sum a + b + cin.
module tb_rca;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      {cin, a, b} = (2 * W + 1)'(i);
      #1;
      checks++;
      if ({cout, s} !== (W + 1)'(a + b + cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0b -> cout=%0b s=%0d", a, b, cin, cout, s);
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
