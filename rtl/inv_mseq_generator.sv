// inv_mseq_generator: Fibonacci generator of the inverse m-sequence, built
// from N sr_dff flip-flops FF_1..FF_N, with the set/reset path that loads the
// next code word.
//
// Shifting (gamma = 1). Each clock edge moves FF_{i+1} into FF_i and writes
// the feedback bit f into FF_N, where
//     f = Q1 xor ( xor of Q_{j+1} over every j with c_j = 1 ).
// There is one XOR gate per non-zero coefficient c_j (j = 1..N-1) of the
// generator polynomial COEFF, so the D inputs carry no load gating at all.
// With the 8-bit defaults the register steps 01100011 -> 11000110 ->
// 10001101 -> ... towards the reference word.
//
// Loading (gamma = 0). Every flip-flop sees S = not(Y_i) or gamma and
// R = Y_i or gamma on its active-low set/reset pins, so it is forced to Y_i
// at once, independent of the clock. When gamma returns to 1 both pins are
// released and shifting resumes from the loaded word on the next edge.
//
// Ports: clk; gamma (1 = shift, 0 = load y); y = Y1..YN (Y1 in the MSB);
// q = Q1..QN (Q1 in the MSB).
module inv_mseq_generator #(
  parameter int unsigned N = fib_conv_pkg::N8,
  parameter logic [N-1:0] COEFF = fib_conv_pkg::COEFF_N8
) (
  input  logic         clk,
  input  logic         gamma,
  input  logic [N-1:0] y,
  output logic [N-1:0] q
);

  logic [N-1:0] d;       // D input of each flip-flop
  logic [N-1:0] set_n;   // S of each flip-flop (active low)
  logic [N-1:0] rst_n;   // R of each flip-flop (active low)
  logic [N-1:0] chain;   // running XOR along the feedback loop
  logic         fb;

  // Feedback: start from Q1 (bit N-1) and add Q_{j+1} (bit N-1-j) for each
  // c_j = 1; a stage with c_j = 0 is a plain wire.
  assign chain[0] = q[N-1];
  for (genvar j = 1; j < N; j++) begin : g_fb
    if (COEFF[j]) begin : g_xor
      assign chain[j] = chain[j-1] ^ q[N-1-j];
    end else begin : g_wire
      assign chain[j] = chain[j-1];
    end
  end
  assign fb = chain[N-1];

  // Shift towards Q1: FF_i takes FF_{i+1}, FF_N takes the feedback bit.
  assign d = {q[N-2:0], fb};

  // Code-word write path through the asynchronous set/reset pins.
  assign set_n = ~y | {N{gamma}};
  assign rst_n =  y | {N{gamma}};

  for (genvar i = 0; i < N; i++) begin : g_ff
    sr_dff u_ff (
      .clk  (clk),
      .d    (d[i]),
      .set_n(set_n[i]),
      .rst_n(rst_n[i]),
      .q    (q[i])
    );
  end

endmodule
