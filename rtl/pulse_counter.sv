// pulse_counter: counts the clock pulses of the current conversion.
//
// The counter adds one at every rising clock edge and is cleared, without
// waiting for the clock, while clr_n (driven by gamma) is 0. A conversion
// starts from 0 at the moment the next code word is loaded; after p edges
// the register reaches the reference word and the count is p, the position
// in natural binary code. N bits cover the largest position, 2^N - 2.
//
// Counting up with an asynchronous active-low clear, like a standard binary
// counter chip, is this design's choice; the counter's structure is not
// specified beyond "counts clock pulses, then is reset to zero".
//
// Ports: clk, clr_n in; count out. The count changes after each clock edge
// and drops to 0 as soon as clr_n falls.
module pulse_counter #(
  parameter int unsigned N = fib_conv_pkg::N8
) (
  input  logic         clk,
  input  logic         clr_n,
  output logic [N-1:0] count
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) count <= '0;
    else        count <= count + 1'b1;
  end

endmodule
