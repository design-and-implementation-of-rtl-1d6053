// End-to-end self-checking testbench for the 128-bit regular SQRT CSLA at its
// full size. Every cycle it applies one pair of 128-bit operands and a carry
// in, and compares {cout, sum} with the 129-bit integer sum worked out in the
// testbench. The vectors are directed corner cases (zeros, all ones, carry
// rippling through the whole word, carries entering each 16-bit block) and
// then pseudo-random operands with random bit runs, so that long carry chains
// occur often.
//
// It also counts how often each mechanism of the adder was used and fails if
// one never was: every carry-select group must have selected both its
// carry-in-0 and its carry-in-1 result, every carry between 16-bit blocks must
// have been both 0 and 1, and the carry out must have been both 0 and 1. The
// carry into each bit is recovered from the reference as a ^ b ^ sum. Groups
// start at bits 2, 4, 7 and 11 of every 16-bit block (widths 2, 3, 4, 5 above
// a 2-bit ripple adder). The adder is combinational; the clock here only paces
// the vectors and drives the watchdog.
module tb_sqrt_csla128;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W          = 128;
  localparam int unsigned NBLK       = W / 16;
  localparam int unsigned NUM_RANDOM = 20000;
  localparam int unsigned MAX_CYCLES = NUM_RANDOM + 1000;
  localparam int unsigned GROUP_LSB[4] = '{2, 4, 7, 11};

  logic         clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;

  int checks = 0, failures = 0, cycles = 0;
  int sel_seen[NBLK][4][2];
  int blk_carry_seen[NBLK][2];
  int cout_seen[2];
  int full_ripple = 0;

  sqrt_csla128 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  // Random operand built of runs of equal bits, which yields long carry chains.
  function automatic logic [W-1:0] rand_runs();
    logic [W-1:0] r;
    logic         bit_v = 1'($urandom);
    int           i = 0;
    while (i < W) begin
      int len = 1 + ($urandom % 24);
      for (int k = 0; k < len && i < W; k++) r[i++] = bit_v;
      bit_v = ~bit_v;
    end
    return r;
  endfunction

  task automatic apply(input logic [W-1:0] av, input logic [W-1:0] bv, input logic cv);
    logic [W:0]   ref_v;
    logic [W-1:0] carry_into;
    @(negedge clk);
    a   = av;
    b   = bv;
    cin = cv;
    @(posedge clk);
    ref_v      = {1'b0, av} + {1'b0, bv} + (W + 1)'(cv);
    carry_into = av ^ bv ^ ref_v[W-1:0];
    checks++;
    if ({cout, sum} !== ref_v) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h cin=%0b -> got %0b_%h expected %0b_%h",
                 av, bv, cv, cout, sum, ref_v[W], ref_v[W-1:0]);
    end
    for (int k = 0; k < NBLK; k++) begin
      for (int g = 0; g < 4; g++) sel_seen[k][g][carry_into[16 * k + GROUP_LSB[g]]]++;
      if (k > 0) blk_carry_seen[k][carry_into[16 * k]]++;
    end
    cout_seen[ref_v[W]]++;
    if (cv && ((av ^ bv) == '1)) full_ripple++;
  endtask

  initial begin
    a = '0; b = '0; cin = 1'b0;
    // Directed corner cases.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);                 // carry ripples through every bit
    apply('0, '1, 1'b1);
    apply({(W/2){2'b10}}, {(W/2){2'b01}}, 1'b1);
    for (int k = 0; k < NBLK; k++) begin
      // Carry generated at the top of block k and propagated through the rest.
      logic [W-1:0] av = '1;
      logic [W-1:0] bv = '0;
      bv[16 * k + 15] = 1'b1;
      apply(av, bv, 1'b0);
      apply(av << (16 * k), W'(1) << (16 * k), 1'b0);
    end
    // Pseudo-random vectors.
    for (int n = 0; n < NUM_RANDOM; n++) begin
      case (n % 4)
        0: apply(rand_word(), rand_word(), 1'($urandom));
        1: apply(rand_runs(), rand_runs(), 1'($urandom));
        2: begin
          logic [W-1:0] av = rand_runs();
          apply(av, ~av ^ (rand_word() & rand_word() & rand_word() & rand_word()), 1'($urandom));
        end
        default: apply(rand_word(), ~rand_runs(), 1'($urandom));
      endcase
    end

    // Every mechanism must have been exercised.
    for (int k = 0; k < NBLK; k++) begin
      for (int g = 0; g < 4; g++)
        for (int v = 0; v < 2; v++) begin
          checks++;
          if (sel_seen[k][g][v] == 0) begin
            failures++;
            $display("FAIL block %0d group %0d never selected carry-in-%0d result", k, g, v);
          end
        end
      if (k > 0)
        for (int v = 0; v < 2; v++) begin
          checks++;
          if (blk_carry_seen[k][v] == 0) begin
            failures++;
            $display("FAIL carry into block %0d never was %0d", k, v);
          end
        end
    end
    for (int v = 0; v < 2; v++) begin
      checks++;
      if (cout_seen[v] == 0) begin
        failures++;
        $display("FAIL carry out never was %0d", v);
      end
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL no carry rippled through all %0d bits", W);
    end
    $display("coverage: cycles=%0d full_ripple=%0d cout0=%0d cout1=%0d sel0[0][0]=%0d sel1[0][0]=%0d",
             cycles, full_ripple, cout_seen[0], cout_seen[1], sel_seen[0][0][0], sel_seen[0][0][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
