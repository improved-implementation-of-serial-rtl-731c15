// tb_output_register: checks that the result register takes the count
// present when gamma falls (a short pulse right after a clock edge, together
// with the count being cleared as in the converter), holds it otherwise, and
// reads 0 once gamma has stayed low across a clock edge (disk resting at the
// reference sector), until the next falling gamma brings a new count.
`timescale 1ns/1ps
module tb_output_register;
  import fib_conv_pkg::*;

  logic          clk = 1'b0, gamma = 1'b1;
  logic [N8-1:0] count = '0;
  logic [N8-1:0] p;
  int checks = 0, failures = 0;

  output_register dut (.clk(clk), .gamma(gamma), .count(count), .p(p));

  always #5 clk = ~clk;

  task automatic expect_p(input int v, input string what);
    checks++;
    if (p !== N8'(v)) begin
      failures++;
      $display("FAIL %0t: %s p=%0d expected %0d", $time, what, p, v);
    end
  endtask

  // End of a conversion with result v: gamma pulses low while the count is
  // cleared in the same instant.
  task automatic finish_with(input int v);
    count = N8'(v);
    @(posedge clk);
    gamma <= 1'b0;
    #1 gamma = 1'b1;
    #1;
  endtask

  int last;

  // The converter's counter clears on the same falling gamma.
  always @(negedge gamma) count <= '0;

  initial begin
    finish_with(3);
    last = 3;
    for (int i = 0; i < 200; i++) begin
      int v;
      v = $urandom_range(254, 1);
      count = N8'($urandom);          // a running count is not taken
      repeat (2) @(posedge clk);
      #1 expect_p(last, "holds between ends");
      finish_with(v);
      expect_p(v, "takes the count at the end of a conversion");
      last = v;
      if (i % 20 == 7) begin
        // Resting at the reference sector: gamma stays low.
        last = $urandom_range(254, 1);
        count = N8'(last);
        @(posedge clk);
        gamma <= 1'b0;
        #1 expect_p(last, "end of conversion before the rest");
        repeat (2) @(posedge clk);
        #1 expect_p(0, "resting at the reference sector");
        @(negedge clk) gamma = 1'b1;  // disk moves on
        repeat (2) @(posedge clk);
        #1 expect_p(0, "0 kept until the next result");
        last = 0;
      end
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
