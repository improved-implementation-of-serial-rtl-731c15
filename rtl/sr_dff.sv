// sr_dff: D flip-flop with active-low asynchronous set and reset inputs, the
// storage element of the converter's shift register (one FF_i).
//
// The converter writes a flip-flop through two separate paths. While both
// set_n and rst_n are 1 the flip-flop is an ordinary rising-edge D flip-flop
// (Q = D at each clock edge). While exactly one of them is 0 the output is
// forced, without waiting for the clock, to the value on rst_n: set_n = 0,
// rst_n = 1 gives Q = 1 and set_n = 1, rst_n = 0 gives Q = 0. The shifting
// bit therefore enters through D with no gating in front of it, and the next
// code word enters through set_n/rst_n.
//
// Both inputs low at once is never produced by the converter (set_n and
// rst_n are complements while a word is loaded); the flip-flop then resets,
// which is this design's choice, and an assertion flags the case.
//
// Ports: clk, d, set_n, rst_n in; q out. No delay beyond the clock edge or
// the set/reset event.
module sr_dff (
  input  logic clk,
  input  logic d,
  input  logic set_n,
  input  logic rst_n,
  output logic q
);

  always_ff @(posedge clk or negedge set_n or negedge rst_n) begin
    if (!rst_n)      q <= 1'b0;
    else if (!set_n) q <= 1'b1;
    else             q <= d;
  end

  // The write path never asserts set and reset together.
  a_not_both_low: assert property (@(posedge clk) set_n || rst_n)
    else $error("sr_dff: set_n and rst_n both low");

endmodule
