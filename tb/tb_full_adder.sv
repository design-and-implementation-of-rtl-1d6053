// Self-checking testbench for full_adder: applies all eight input
// combinations and compares sum and carry out with the full adder truth table,
// held here as a constant table indexed by {cin, b, a}.
module tb_full_adder;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  // Truth table rows in the order {cin, b, a} = 0..7; each entry is {cout, s}.
  localparam logic [1:0] TABLE[8] = '{2'b00, 2'b01, 2'b01, 2'b10,
                                      2'b01, 2'b10, 2'b10, 2'b11};

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {cin, b, a} = 3'(i);
      #1;
      checks++;
      if ({cout, s} !== TABLE[i]) begin
        failures++;
        $display("FAIL cin=%0b b=%0b a=%0b -> cout=%0b s=%0b", cin, b, a, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
