// tb_fib_pr_converter_n6: end-to-end test of the 6-bit converter, the
// one-XOR configuration (X^6 + X^5 + 1, reference word 111110). Same method
// as the 8-bit test: a disk model built by stepping the direct m-sequence
// back from the reference word, every one of the 63 sectors converted in a
// shuffled order, the farthest sector, rests at the reference sector and the
// all-zero power-up state. Each result and its cycle count are checked at
// the end of the conversion.
`timescale 1ns/1ps
module tb_fib_pr_converter_n6;
  import fib_conv_pkg::*;

  localparam int unsigned N = N6;
  localparam logic [N-1:0] COEFF = COEFF_N6;
  localparam logic [N-1:0] REFW = REF_N6;
  localparam int unsigned L = (1 << N) - 1;   // sectors on the disk

  logic         clk = 1'b0;
  logic [N-1:0] y;
  logic [N-1:0] p;
  logic         gamma;
  logic [N-1:0] state;

  fib_pr_converter #(.N(N), .COEFF(COEFF), .REF_WORD(REFW)) dut (.clk(clk), .y(y), .p(p), .gamma(gamma), .state(state));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conv = 0, n_rest = 0, n_zero_escape = 0, n_far = 0;
  int n_change_while_rest = 0;

  // ---- disk model -------------------------------------------------------
  logic [N-1:0] disk [L];
  int           pos_of [logic [N-1:0]];

  // One step back along the disk: undo "shift towards Q1, feed f into QN".
  function automatic logic [N-1:0] step_back(input logic [N-1:0] s);
    logic q1;
    q1 = s[0];                                   // f, now in Q_N
    for (int j = 1; j < N; j++)
      if (COEFF[j]) q1 ^= s[N-j];                // Q_{j+1} before = Q_j now
    return {q1, s[N-1:1]};
  endfunction

  int pos = 0;           // sector under the head
  int loaded_pos = -1;   // sector whose word the register started from
  int cycles = 0;        // clock edges since that load
  bit started = 0;
  int n_ends = 0;        // ends of conversion seen since power-up

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %0t: %s", $time, msg);
  endtask

  // Count clock edges of the running conversion.
  always @(posedge clk) if (gamma) cycles++;

  // Word loaded: when gamma rises after a load, the register holds y.
  always @(posedge gamma) begin
    loaded_pos = pos;
    cycles = 0;
  end

  // End of a conversion.
  always @(negedge gamma) begin
    int exp_p, exp_c;
    exp_p = loaded_pos;
    exp_c = cycles;
    #1;
    if (started && exp_p >= 0) begin
      checks++;
      if (p !== N'(exp_p)) fail($sformatf("result %0d, expected sector %0d", p, exp_p));
      checks++;
      if (exp_c != exp_p) fail($sformatf("sector %0d took %0d cycles", exp_p, exp_c));
      n_conv++;
      if (exp_p == L - 1) n_far++;
    end
    n_ends++;
    if (n_ends >= 2) started = 1;
    loaded_pos = pos;
    cycles = 0;
  end

  // While resting at the reference sector, gamma stays low and P reads 0.
  always @(posedge clk) begin
    if (started && !gamma && pos == 0) begin
      #1;
      checks++;
      if (p !== '0) fail($sformatf("resting at sector 0 but P = %0d", p));
      checks++;
      if (state !== REFW) fail("register left the reference word while resting");
      n_rest++;
    end
  end

  // Turn the disk to sector s, between clock edges.
  task automatic move_to(input int s);
    @(negedge clk);
    if (!gamma && pos == 0 && s != 0) n_change_while_rest++;
    pos = s;
    y = disk[s];
  endtask

  // Wait for the conversion that loads the current word to finish.
  task automatic wait_result();
    @(negedge gamma);
    @(negedge gamma);
    #2;
  endtask

  int order [L];

  // Placing the register in the all-zero state: force every flip-flop to 0
  // and let go; the flip-flops keep 0 until the design writes them again.
  logic zero_req = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_zero
    always @(posedge zero_req) begin
      force dut.u_gen.g_ff[i].u_ff.q = 1'b0;
      @(negedge zero_req);
      release dut.u_gen.g_ff[i].u_ff.q;
    end
  end

  initial begin
    // Build the disk: sector 0 carries the reference word.
    disk[0] = REFW;
    for (int s = 1; s < L; s++) disk[s] = step_back(disk[s-1]);
    for (int s = 0; s < L; s++) begin
      if (pos_of.exists(disk[s])) fail("disk model repeats a word");
      pos_of[disk[s]] = s;
    end
    checks++;
    if (pos_of.num() != L) fail("disk model is not a full m-sequence");

    // Power-up: the register starts from an arbitrary state, so the first
    // result is not checked; the second is.
    pos = 1;
    y = disk[1];
    @(negedge gamma);
    @(negedge gamma);
    #2;

    // Farthest sector, and a few sectors in a row.
    move_to(L - 1);                wait_result();
    move_to(1);                    wait_result();
    move_to(2);                    wait_result();

    // Rest at the reference sector, then leave it.
    move_to(0);
    repeat (6) @(posedge clk);
    move_to(5);                    wait_result();

    // Every sector once, in a shuffled order; the disk is moved while a
    // conversion is running, as a real disk would be.
    for (int s = 0; s < L; s++) order[s] = s;
    for (int s = L - 1; s > 0; s--) begin
      int r, t;
      r = $urandom_range(s, 0);
      t = order[s]; order[s] = order[r]; order[r] = t;
    end
    for (int s = 0; s < L; s++) begin
      move_to(order[s]);
      if (order[s] == 0) begin
        wait (!gamma);
        repeat (3) @(posedge clk);
      end else begin
        wait_result();
      end
    end

    // The forbidden all-zero state, as after power-up: NAND0 must pull the
    // register out by loading the word under the head.
    move_to(7);
    @(posedge clk); #1;
    loaded_pos = -1;         // the interrupted conversion is not checked
    zero_req = 1'b1;
    #1;
    checks++;
    if (state !== '0) fail("could not place the register in the all-zero state");
    zero_req = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (state !== disk[7])
      fail($sformatf("register did not leave the all-zero state: %b", state));
    else n_zero_escape++;
    // The word loaded from the all-zero state converts normally.
    @(negedge gamma); #2;
    checks++;
    if (p !== N'(7)) fail($sformatf("after the all-zero state P = %0d, expected 7", p));

    repeat (3) @(posedge clk);
    checks++; if (n_conv < L) fail($sformatf("only %0d conversions checked", n_conv));
    checks++; if (n_rest == 0) fail("never rested at the reference sector");
    checks++; if (n_far == 0) fail("farthest sector never converted");
    checks++; if (n_zero_escape == 0) fail("all-zero state never left");
    checks++; if (n_change_while_rest == 0) fail("never left the reference sector");
    $display("mechanisms: conversions=%0d rest_cycles=%0d farthest=%0d leave_rest=%0d zero_escape=%0d",
             n_conv, n_rest, n_far, n_change_while_rest, n_zero_escape);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
