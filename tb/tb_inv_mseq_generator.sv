// tb_inv_mseq_generator: checks the shift register of the converter for the
// 8-bit polynomial X^8 + X^6 + X^5 + X^2 + 1 and the 6-bit X^6 + X^5 + 1.
//  - Loading: with gamma = 0 the register takes y at once, without a clock
//    edge, follows y while gamma stays 0, and keeps it on release.
//  - Shifting: from 01100011 the 8-bit register must step through the nine
//    states of the worked example to 10100000.
//  - Every step must be undone by one step of the disk's direct m-sequence
//    (computed here from the polynomial), and the register must visit all
//    2^n - 1 non-zero states before it returns to its start.
`timescale 1ns/1ps
module tb_inv_mseq_generator;
  import fib_conv_pkg::*;

  logic          clk = 1'b0;
  logic          g8 = 1'b1, g6 = 1'b1;
  logic [N8-1:0] y8 = '0, q8;
  logic [N6-1:0] y6 = '0, q6;
  int checks = 0, failures = 0;

  inv_mseq_generator dut8 (.clk(clk), .gamma(g8), .y(y8), .q(q8));
  inv_mseq_generator #(.N(N6), .COEFF(COEFF_N6)) dut6 (.clk(clk), .gamma(g6), .y(y6), .q(q6));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // One step of the direct sequence: the inverse of the register's step.
  function automatic logic [N8-1:0] back8(input logic [N8-1:0] s);
    logic b;
    b = s[0];
    for (int j = 1; j < N8; j++) if (COEFF_N8[j]) b ^= s[N8-j];
    return {b, s[N8-1:1]};
  endfunction
  function automatic logic [N6-1:0] back6(input logic [N6-1:0] s);
    logic b;
    b = s[0];
    for (int j = 1; j < N6; j++) if (COEFF_N6[j]) b ^= s[N6-j];
    return {b, s[N6-1:1]};
  endfunction

  task automatic tick();
    #2 clk = 1'b1;
    #2 clk = 1'b0;
  endtask

  logic [N8-1:0] example [10] = '{8'b01100011, 8'b11000110, 8'b10001101,
    8'b00011010, 8'b00110101, 8'b01101010, 8'b11010100, 8'b10101000,
    8'b01010000, 8'b10100000};

  initial begin
    logic [N8-1:0] prev8, start8;
    logic [N6-1:0] prev6, start6;
    int steps;

    #1;
    // Asynchronous load, then follow y while gamma = 0.
    g8 = 1'b0;
    y8 = 8'b0110_0011;
    #1 check(q8 === 8'b0110_0011, "load without clock");
    y8 = 8'b1001_1100;
    #1 check(q8 === 8'b1001_1100, "follows y while gamma = 0");
    tick();
    check(q8 === 8'b1001_1100, "no shift while gamma = 0");
    y8 = 8'b0110_0011;
    #1 g8 = 1'b1;
    y8 = 8'b1111_1111;                // y is ignored while shifting
    #1 check(q8 === 8'b0110_0011, "kept after release");

    // Worked example.
    for (int i = 1; i < 10; i++) begin
      tick();
      check(q8 === example[i], $sformatf("example step %0d: %b", i, q8));
    end

    // Full period, n = 8.
    start8 = q8;
    steps = 0;
    do begin
      prev8 = q8;
      tick();
      steps++;
      check(back8(q8) === prev8, $sformatf("n=8 step %b -> %b", prev8, q8));
    end while (q8 !== start8 && steps < 300);
    check(steps == 255, $sformatf("n=8 period %0d", steps));

    // n = 6: load the reference word, then one full period.
    g6 = 1'b0;
    y6 = REF_N6;
    #1 check(q6 === REF_N6, "n=6 load");
    g6 = 1'b1;
    start6 = q6;
    steps = 0;
    do begin
      prev6 = q6;
      tick();
      steps++;
      check(back6(q6) === prev6, $sformatf("n=6 step %b -> %b", prev6, q6));
    end while (q6 !== start6 && steps < 100);
    check(steps == 63, $sformatf("n=6 period %0d", steps));

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
