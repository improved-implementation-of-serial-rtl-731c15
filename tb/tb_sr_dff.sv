// tb_sr_dff: checks the flip-flop with the converter's two write paths.
// With set_n = rst_n = 1 it must act as a rising-edge D flip-flop; with
// exactly one of them low it must take the value of rst_n at once, without a
// clock edge, and hold it against clock edges and D; after release it must
// keep that value until the next edge. Random stimulus, compared with a
// reference computed in the testbench.
`timescale 1ns/1ps
module tb_sr_dff;
  logic clk = 1'b0, d = 1'b0, set_n = 1'b1, rst_n = 1'b1, q;
  int checks = 0, failures = 0;
  logic model;

  sr_dff dut (.clk(clk), .d(d), .set_n(set_n), .rst_n(rst_n), .q(q));

  task automatic expect_q(input logic v, input string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %0t: %s q=%b expected %b", $time, what, q, v);
    end
  endtask

  initial begin
    // Clocked path.
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      #2 clk = 1'b1; model = d;
      #1 expect_q(model, "D path");
      d = ~d;                         // D changing between edges is ignored
      #1 expect_q(model, "D between edges");
      #1 clk = 1'b0;
      #1;
    end
    // Set/reset path, asynchronous and dominant over D and the clock.
    for (int i = 0; i < 200; i++) begin
      logic y;
      y = 1'($urandom);
      d = ~y;
      #1 set_n = ~y; rst_n = y;       // Q = R
      #1 expect_q(y, "S/R write without clock");
      #1 clk = 1'b1;
      #1 expect_q(y, "S/R write holds against D at an edge");
      #1 clk = 1'b0;
      // Word changes while loading: the other pin falls.
      y = ~y;
      set_n = ~y; rst_n = y;
      #1 expect_q(y, "S/R follows a new value");
      set_n = 1'b1; rst_n = 1'b1;     // release
      #1 expect_q(y, "value kept after release");
      d = 1'($urandom);
      #1 clk = 1'b1; model = d;
      #1 expect_q(model, "D path after release");
      #1 clk = 1'b0;
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
