// tb_pulse_counter: checks that the counter adds one per clock edge, clears
// at once when clr_n falls (between edges, without a clock), stays 0 while
// clr_n is low, and wraps at 2^N.
`timescale 1ns/1ps
module tb_pulse_counter;
  import fib_conv_pkg::*;

  logic          clk = 1'b0, clr_n = 1'b1;
  logic [N8-1:0] count;
  int checks = 0, failures = 0;
  int model;

  pulse_counter dut (.clk(clk), .clr_n(clr_n), .count(count));

  always #5 clk = ~clk;

  task automatic expect_count(input int v, input string what);
    checks++;
    if (count !== N8'(v)) begin
      failures++;
      $display("FAIL %0t: %s count=%0d expected %0d", $time, what, count, v);
    end
  endtask

  initial begin
    @(negedge clk);
    clr_n = 1'b0;
    #1 expect_count(0, "clear without clock");
    @(posedge clk); #1 expect_count(0, "held in clear");
    @(negedge clk) clr_n = 1'b1;
    model = 0;
    for (int r = 0; r < 20; r++) begin
      int len;
      len = $urandom_range(300, 1);
      repeat (len) begin
        @(posedge clk); #1;
        model = (model + 1) % 256;
        expect_count(model, "count");
      end
      @(negedge clk);
      clr_n = 1'b0;
      #1 expect_count(0, "asynchronous clear");
      #1 clr_n = 1'b1;               // short pulse, as gamma is
      model = 0;
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
