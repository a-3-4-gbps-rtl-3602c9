// tb_prbs7_gen: end-to-end self-checking testbench of the PRBS-7 generator at its default
// parameters (7 stages, tap 3, all-ones seed).
//
// The generator is reset, released and run for several full periods, reset again in the middle
// of a clock cycle, and run again. The checks use only properties of the sequence that follow
// from P(x) = x^7 + x^3 + 1, computed here independently of the RTL:
//  - reset: the register shows the all-ones seed at once, without a clock edge;
//  - the first 7 output bits after release are the seed, read from the last stage backwards;
//  - every later output bit obeys s(k) = s(k-3) xor s(k-7);
//  - the register shifts: stage i holds what stage i-1 held one clock before;
//  - the register visits 127 distinct non-zero states and returns to the seed after exactly
//    127 clocks (the sequence length), never earlier;
//  - each 127-bit period holds 64 ones and 63 zeros;
//  - the output rails are complementary on every cycle.
// Counted mechanisms, each of which must occur: reset, sequence wrap-around (return to the seed
// state), feedback of a 1 into stage 1 through the XOR, and every one of the 127 states.
// Clock period 10 ns (the bit clock is not simulated at its real rate); a watchdog ends the
// run with a failure after 20000 cycles.
module tb_prbs7_gen;
  import prbs_pkg::*;

  localparam int unsigned N = PRBS_LEN;
  localparam int unsigned PERIOD = PRBS_PERIOD;
  localparam logic [N-1:0] SEED = '1;
  localparam int RUN_PERIODS = 4;
  localparam int NBITS = RUN_PERIODS * int'(PERIOD) + 1;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  diff_t out;
  logic [N-1:0] state;

  prbs7_gen dut (.clk(clk), .rst_n(rst_n), .out(out), .state(state));

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_resets = 0;
  int n_wraps = 0;
  int n_feedback_ones = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%b out=%0b/%0b", what, $time, state, out.p, out.n);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one stretch from a reset: apply the reset asynchronously in mid-cycle, check the seed,
  // release it and check RUN_PERIODS periods of output.
  task automatic run_from_reset();
    logic s [NBITS];
    int idx;
    logic [N-1:0] prev_state;
    bit seen [logic [N-1:0]];
    int ones;
    int first_wrap;

    @(negedge clk);
    #2 rst_n = 1'b0;
    #1;
    n_resets++;
    check(state == SEED, "seed loaded by asynchronous reset");
    check(out.p == SEED[N-1] && out.n == !SEED[N-1], "output shows seed during reset");
    repeat (2) @(posedge clk);
    #1;
    check(state == SEED, "seed held during reset");
    @(negedge clk);
    rst_n = 1'b1;

    seen.delete();
    first_wrap = -1;
    // Output before the first edge after release is stage N's seed bit.
    s[0] = out.p;
    prev_state = state;
    seen[state] = 1'b1;

    for (int k = 1; k <= RUN_PERIODS * int'(PERIOD); k++) begin
      @(posedge clk);
      #1;
      s[k] = out.p;
      check(out.n == !out.p, "complementary output rails");
      check(state != '0, "state never all-zero");
      check(state[N-1:1] == prev_state[N-2:0], "register shifts one stage per clock");
      if (state[0]) n_feedback_ones++;
      if (k <= int'(PERIOD)) seen[state] = 1'b1;
      if (state == SEED) begin
        n_wraps++;
        if (first_wrap < 0) first_wrap = k;
      end
      prev_state = state;
    end

    // First N output bits are the seed, last stage first.
    for (int k = 0; k < int'(N); k++)
      check(s[k] == SEED[N-1-k], "first output bits equal the seed");
    // Recurrence of the output sequence.
    for (int k = int'(N); k < NBITS; k++)
      check(s[k] == (s[k-3] ^ s[k-7]), "output obeys s(k) = s(k-3) xor s(k-7)");
    // Sequence length.
    check(first_wrap == int'(PERIOD), $sformatf("first return to seed after %0d clocks", first_wrap));
    check(seen.num() == int'(PERIOD), $sformatf("%0d distinct states in one period", seen.num()));
    for (int k = 0; k + int'(PERIOD) < NBITS; k++) begin
      idx = k + int'(PERIOD);
      check(s[idx] == s[k], "output repeats after 127 bits");
    end
    // Balance of one period.
    ones = 0;
    for (int k = 0; k < int'(PERIOD); k++) ones += int'(s[k]);
    check(ones == 64, $sformatf("%0d ones in one period, expected 64", ones));
  endtask

  initial begin
    // Power-up: start in reset.
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    run_from_reset();
    // Run on a little, then reset in mid-run and check again.
    repeat (37) @(posedge clk);
    run_from_reset();

    check(n_resets >= 2, "reset happened");
    check(n_wraps >= 1, "sequence wrapped around to the seed");
    check(n_feedback_ones >= 1, "feedback of a 1 into stage 1");
    $display("mechanisms: resets=%0d wraps=%0d feedback_ones=%0d", n_resets, n_wraps,
             n_feedback_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
