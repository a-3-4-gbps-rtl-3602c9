// cml_xor: differential exclusive-OR gate, the feedback tap of the PRBS-7 register.
//
// The silicon gate is a current-mode-logic (CML) stage: two differential pairs on the A
// inputs, steered by a third pair on the B inputs, a current-mirror tail and resistive loads,
// with complementary outputs OUT+/OUT-. At the logic level it computes Y = A xor B on
// differential pairs. Each input pair is resolved by its + rail, and the output is always a
// complementary pair, as the loads of a CML stage always leave one output high and one low.
//
// Interface: a, b (inputs) and y (output), each a prbs_pkg::diff_t pair.
// Timing: purely combinational; the analog gate delay is not modelled.
// From the design description: the gate, its function and its port names. Design choice here:
// resolving an input pair by its + rail.
module cml_xor
  import prbs_pkg::*;
(
  input  diff_t a,
  input  diff_t b,
  output diff_t y
);

  logic x;

  always_comb begin
    x = a.p ^ b.p;
    y = to_diff(x);
  end

endmodule
