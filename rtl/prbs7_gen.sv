// prbs7_gen: differential 2^7-1 pseudo-random bit sequence (PRBS-7) generator.
//
// A linear feedback shift register of LFSR_LEN differential D flip-flops (saff_dff) in series.
// Flip-flop 1 takes the output of a differential XOR gate (cml_xor) whose inputs are the
// outputs of flip-flop TAP and of the last flip-flop; the last flip-flop drives the serial
// output. With the defaults (7 stages, tap 3) the register realises P(x) = x^7 + x^3 + 1, a
// primitive polynomial, so the output repeats every 127 clocks and the register runs through
// all 127 non-zero states; each period holds 64 ones and 63 zeros. Seen on the output, bit
// s(k) = s(k-3) xor s(k-7).
//
// Interface: clk (the bit clock, one output bit per rising edge), rst_n (asynchronous, active
// low), out (OUT+/OUT-, prbs_pkg::diff_t), state (the flip-flop outputs, state[0] is
// flip-flop 1, for observation).
// Timing: while rst_n is low the register holds SEED and out shows SEED's top bit; after the
// release the register shifts on every rising clock edge.
// From the design description: the stage count, the tap, the series connection, the XOR in
// the feedback and the differential signalling. Design choices here: the reset with its
// non-zero SEED (the all-zero state would lock the register) and the state output.
module prbs7_gen
  import prbs_pkg::*;
#(
  parameter int unsigned         LFSR_LEN = PRBS_LEN,
  parameter int unsigned         TAP      = PRBS_TAP,
  parameter logic [LFSR_LEN-1:0] SEED     = '1
) (
  input  logic                clk,
  input  logic                rst_n,
  output diff_t               out,
  output logic [LFSR_LEN-1:0] state
);

  if (TAP < 1 || TAP >= LFSR_LEN) begin : g_bad_tap
    $error("prbs7_gen: TAP must lie between 1 and LFSR_LEN-1");
  end
  if (SEED == '0) begin : g_bad_seed
    $error("prbs7_gen: an all-zero SEED locks the register");
  end

  diff_t stage_q [LFSR_LEN];   // flip-flop outputs, stage_q[0] = flip-flop 1
  diff_t stage_d [LFSR_LEN];   // flip-flop inputs
  diff_t feedback;             // XOR output into flip-flop 1

  cml_xor u_tap_xor (
    .a (stage_q[TAP-1]),
    .b (stage_q[LFSR_LEN-1]),
    .y (feedback)
  );

  for (genvar i = 0; i < LFSR_LEN; i++) begin : g_stage
    if (i == 0) begin : g_first
      assign stage_d[i] = feedback;
    end else begin : g_next
      assign stage_d[i] = stage_q[i-1];
    end

    saff_dff #(
      .RESET_VAL (SEED[i])
    ) u_dff (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (stage_d[i]),
      .q     (stage_q[i])
    );

    assign state[i] = stage_q[i].p;
  end

  assign out = stage_q[LFSR_LEN-1];

  // The register must never reach the all-zero state, from which it cannot leave.
  a_never_zero : assert property (@(posedge clk) disable iff (!rst_n) state != '0)
    else $error("prbs7_gen: register reached the all-zero state");

  // The output must always be a complementary pair.
  a_out_diff : assert property (@(posedge clk) diff_valid(out))
    else $error("prbs7_gen: output rails are not complementary");

endmodule
