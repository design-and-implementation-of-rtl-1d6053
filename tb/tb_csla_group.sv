// Self-checking testbench for csla_group. Two instances are checked
// exhaustively: the default 2-bit group and a 5-bit group, the widest one used
// in a 16-bit block. {cout, s} must equal the integer sum a + b + cin, and each
// instance must have been exercised with both values of its select (cin).
module tb_csla_group;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned WS = 2;
  localparam int unsigned WL = 5;

  logic [WS-1:0] a_s, b_s, s_s;
  logic [WL-1:0] a_l, b_l, s_l;
  logic          cin, cout_s, cout_l;
  int checks = 0, failures = 0;
  int sel_seen[2] = '{0, 0};

  csla_group              dut_s (.a(a_s), .b(b_s), .cin(cin), .s(s_s), .cout(cout_s));
  csla_group #(.W(WL))    dut_l (.a(a_l), .b(b_l), .cin(cin), .s(s_l), .cout(cout_l));

  initial begin
    for (int i = 0; i < (1 << (2 * WL + 1)); i++) begin
      {cin, a_l, b_l} = (2 * WL + 1)'(i);
      a_s = a_l[WS-1:0];
      b_s = b_l[WS-1:0];
      #1;
      sel_seen[cin]++;
      checks++;
      if ({cout_l, s_l} !== (WL + 1)'(a_l + b_l + cin)) begin
        failures++;
        $display("FAIL W=%0d a=%0d b=%0d cin=%0b -> %0b_%0d", WL, a_l, b_l, cin, cout_l, s_l);
      end
      checks++;
      if ({cout_s, s_s} !== (WS + 1)'(a_s + b_s + cin)) begin
        failures++;
        $display("FAIL W=%0d a=%0d b=%0d cin=%0b -> %0b_%0d", WS, a_s, b_s, cin, cout_s, s_s);
      end
    end
    for (int v = 0; v < 2; v++) begin
      checks++;
      if (sel_seen[v] == 0) begin
        failures++;
        $display("FAIL select value %0d never applied", v);
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
