// fib_pr_converter: improved serial Fibonacci pseudorandom/natural code
// converter for an N-bit pseudorandom absolute position encoder.
//
// The word Y1..YN read from the code disk is loaded into the shift register
// of a Fibonacci generator of the inverse m-sequence. Each clock edge steps
// the register one state back along the disk's sequence and a counter counts
// the edges. When the register reaches the reference word (the code of the
// zero sector) gamma falls: the count, which is the position p in natural
// binary, goes to the output register, the counter clears and the next word
// read from the disk is loaded. A conversion therefore takes p clock cycles.
//
// What makes this version fast is the write path of the flip-flops. The next
// code word is written through their asynchronous set/reset pins
// (S = not Y_i or gamma, R = Y_i or gamma), so the D input of every flip-flop
// is driven straight by its neighbour or by the XOR feedback, with no
// AND-OR selection in front of it. The critical path is clock-to-Q, the XOR
// chain (k gates) and the flip-flop setup time.
//
// Because gamma feeds the set/reset pins of flip-flops whose outputs decide
// gamma, loading is a self-timed pulse: gamma falls, the word is forced in,
// and gamma rises again unless the word is the reference word itself. That
// loop is the intended mechanism and is the one combinational loop of the
// design. The NAND0 gate catches the all-zero power-up state the same way, so
// no reset input is needed; the first result after power-up is not valid.
//
// Parameters: N (resolution, 8 by default), COEFF (generator polynomial,
// bit j = c_j), REF_WORD (Y1..YN of the zero sector). Defaults are the 8-bit
// converter X^8 + X^6 + X^5 + X^2 + 1 with reference 10100000.
//
// Ports: clk; y = Y1..YN from the reading head (Y1 in the MSB), expected to
// change only as the disk moves; p = P1..PN, the last result; gamma, 0 for
// the instant a conversion ends (and while the disk rests at position 0);
// state, the shift register, for observation.
module fib_pr_converter #(
  parameter int unsigned N = fib_conv_pkg::N8,
  parameter logic [N-1:0] COEFF = fib_conv_pkg::COEFF_N8,
  parameter logic [N-1:0] REF_WORD = fib_conv_pkg::REF_N8
) (
  input  logic         clk,
  input  logic [N-1:0] y,
  output logic [N-1:0] p,
  output logic         gamma,
  output logic [N-1:0] state
);

  logic [N-1:0] q;
  logic [N-1:0] count;

  inv_mseq_generator #(.N(N), .COEFF(COEFF)) u_gen (
    .clk  (clk),
    .gamma(gamma),
    .y    (y),
    .q    (q)
  );

  gamma_logic #(.N(N), .REF_WORD(REF_WORD)) u_gamma (
    .q       (q),
    .gamma   (gamma),
    .at_ref  (),
    .all_zero()
  );

  pulse_counter #(.N(N)) u_cnt (
    .clk  (clk),
    .clr_n(gamma),
    .count(count)
  );

  output_register #(.N(N)) u_out (
    .clk  (clk),
    .gamma(gamma),
    .count(count),
    .p    (p)
  );

  assign state = q;

  // The load pulse is self-timed: gamma can only be seen low at a clock edge
  // while the word under the head is the reference word (the register then
  // holds it), or in the all-zero power-up state.
  a_gamma_low_only_at_rest: assert property (
    @(posedge clk) !gamma |-> (q == REF_WORD || q == '0))
    else $error("fib_pr_converter: gamma low at a clock edge away from the reference word");

endmodule
