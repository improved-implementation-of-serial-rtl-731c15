// tb_gamma_logic: checks the end-of-conversion detector over every register
// state, for the 8-bit reference word 10100000 and for the 6-bit one. gamma
// must be 0 exactly for the reference word and for the all-zero state; the
// at_ref and all_zero flags must mark those two states.
`timescale 1ns/1ps
module tb_gamma_logic;
  import fib_conv_pkg::*;

  logic [N8-1:0] q8;
  logic          g8, r8, z8;
  logic [N6-1:0] q6;
  logic          g6, r6, z6;
  int checks = 0, failures = 0;

  gamma_logic dut8 (.q(q8), .gamma(g8), .at_ref(r8), .all_zero(z8));
  gamma_logic #(.N(N6), .REF_WORD(REF_N6)) dut6 (.q(q6), .gamma(g6), .at_ref(r6), .all_zero(z6));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 256; s++) begin
      q8 = 8'(s);
      #1;
      check(g8, !(s == 8'b1010_0000 || s == 0), $sformatf("gamma n=8 state %b", q8));
      check(r8, s == 8'b1010_0000, "at_ref n=8");
      check(z8, s == 0, "all_zero n=8");
    end
    for (int s = 0; s < 64; s++) begin
      q6 = 6'(s);
      #1;
      check(g6, !(s == 6'b11_1110 || s == 0), $sformatf("gamma n=6 state %b", q6));
      check(r6, s == 6'b11_1110, "at_ref n=6");
      check(z6, s == 0, "all_zero n=6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
