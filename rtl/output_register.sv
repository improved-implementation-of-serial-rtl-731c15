// output_register: holds P1..PN, the natural binary result of the last
// finished conversion.
//
// A conversion ends when gamma falls. The register is clocked by that
// falling edge and takes the counter value present at that instant, before
// the counter's clear (driven by the same gamma) takes effect. This relies on
// the counter's clear-to-output delay exceeding this register's hold time,
// as with standard counter and register chips.
//
// Position 0 needs one more piece. When the word read is the reference word
// itself, gamma stays 0 after the load and never falls again, so the edge
// above cannot record the result. A flag sampled with the converter clock
// (at_zero = gamma was 0 at a clock edge) marks that case and clears the
// register asynchronously, so P reads 0 while the disk rests at the
// reference sector and until the next conversion finishes. In normal
// operation gamma is only a short pulse right after a clock edge and the flag
// stays 0. This flag is this design's addition; the basic capture at the end
// of a conversion is the document's.
//
// Ports: clk, gamma, count in; p out (P1 in the MSB).
module output_register #(
  parameter int unsigned N = fib_conv_pkg::N8
) (
  input  logic         clk,
  input  logic         gamma,
  input  logic [N-1:0] count,
  output logic [N-1:0] p
);

  logic at_zero;

  always_ff @(posedge clk) at_zero <= ~gamma;

  always_ff @(negedge gamma or posedge at_zero) begin
    if (at_zero) p <= '0;
    else         p <= count;
  end

endmodule
