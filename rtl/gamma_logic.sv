// gamma_logic: decides whether the current conversion goes on (gamma = 1)
// or has ended (gamma = 0).
//
// NAND1 compares the register with the reference word REF_WORD: each
// flip-flop output enters it directly where the reference bit is 1 and
// through a NOT gate where it is 0, so NAND1 outputs 0 exactly when the
// register holds the reference word. NAND0 takes the inverted outputs of all
// flip-flops and outputs 0 only for the forbidden all-zero state, which can
// occur at power-up. AND_gamma combines the two:
//     gamma = NAND0 and NAND1.
// gamma = 0 therefore both ends a conversion at the reference state and
// pulls the register out of the all-zero state by loading a code word.
//
// Purely combinational. Ports: q = Q1..QN (Q1 in the MSB) in; gamma,
// at_ref (reference reached) and all_zero out.
module gamma_logic #(
  parameter int unsigned N = fib_conv_pkg::N8,
  parameter logic [N-1:0] REF_WORD = fib_conv_pkg::REF_N8
) (
  input  logic [N-1:0] q,
  output logic         gamma,
  output logic         at_ref,
  output logic         all_zero
);

  logic [N-1:0] nand1_in;   // after the NOT gates selected by REF_WORD
  logic         nand1_out;
  logic         nand0_out;

  assign nand1_in  = q ^ ~REF_WORD;   // NOT_i where the reference bit is 0
  assign nand1_out = ~&nand1_in;
  assign nand0_out = ~&(~q);
  assign gamma     = nand0_out & nand1_out;

  assign at_ref    = ~nand1_out;
  assign all_zero  = ~nand0_out;

endmodule
