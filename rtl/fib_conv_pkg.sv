// fib_conv_pkg: constants shared by the Fibonacci pseudorandom/natural code
// converter and its testbenches.
//
// Bit order. A code word Y1 Y2 ... Yn is held in a vector [N-1:0] with Y1 as
// the most significant bit, so a word prints in the same order as it is read
// from the disk (bit N-i holds Y_i, and flip-flop FF_i holds bit N-i).
//
// Generator polynomial. P_n(X) = X^n + c_{n-1} X^{n-1} + ... + c_1 X + 1 is
// stored as a vector [N-1:0] whose bit j is c_j (bit 0 is the constant term
// and is always 1). A coefficient c_j = 1 places one XOR gate in the feedback
// loop; that gate adds the output of FF_{j+1} into the feedback bit.
//
// The 8-bit polynomial X^8 + X^6 + X^5 + X^2 + 1 and the reference word
// 10100000 are the worked example of the converter (three XOR gates). The
// 6-bit converter is the one-XOR example; its polynomial X^6 + X^5 + 1 and
// its reference word 111110 are this design's choice among the primitive
// one-tap polynomials and valid non-zero reference words.
package fib_conv_pkg;

  localparam int unsigned N8 = 8;
  localparam logic [N8-1:0] COEFF_N8 = 8'b0110_0101;  // c6, c5, c2 (+1)
  localparam logic [N8-1:0] REF_N8   = 8'b1010_0000;  // Y1..Y8 at position 0

  localparam int unsigned N6 = 6;
  localparam logic [N6-1:0] COEFF_N6 = 6'b10_0001;    // c5 (+1)
  localparam logic [N6-1:0] REF_N6   = 6'b11_1110;    // Y1..Y6 at position 0

  // Number of XOR gates in the feedback loop (the paper's k).
  function automatic int unsigned xor_count(input logic [31:0] coeff,
                                            input int unsigned n);
    int unsigned k = 0;
    for (int unsigned j = 1; j < n; j++) k += coeff[j];
    return k;
  endfunction

endpackage
