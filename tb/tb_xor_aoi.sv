// Self-checking testbench for xor_aoi: applies all four input pairs and
// compares y with a XOR b worked out in the testbench. A watchdog ends the run
// with a failure if it does not finish in time.
module tb_xor_aoi;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, y;
  int checks = 0, failures = 0;

  xor_aoi dut (.a(a), .b(b), .y(y));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (a != b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
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
