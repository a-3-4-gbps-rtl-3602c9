// saff_dff: sense-amplifier based D flip-flop with differential data input and output.
//
// The silicon cell has two stages. A clocked sense amplifier compares DIN+ with DIN- on the
// rising clock edge and pulls one of its two outputs, S or R, active; an S/R latch then holds
// the result on DOUT+/DOUT- until the next edge. This model keeps that structure at the logic
// level: on a rising edge a valid input pair (rails differ) sets or resets the stored bit, and
// an input pair whose rails are equal produces neither S nor R, so the latch keeps its value.
//
// Interface: clk, rst_n (asynchronous, active low, loads RESET_VAL), d (DIN+/DIN-) and
// q (DOUT+/DOUT-), both prbs_pkg::diff_t.
// Timing: q takes the value of d one rising clock edge after d is sampled; q is always a
// complementary pair.
// From the design description: the two-stage sense-amplifier/latch flip-flop and its ports.
// Design choices here: the reset (the circuit has none) and holding on an invalid input pair.
module saff_dff
  import prbs_pkg::*;
#(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  diff_t d,
  output diff_t q
);

  logic s, r;    // set / reset decisions of the sense stage
  logic state;   // value held by the output latch

  always_comb begin
    s = d.p & ~d.n;
    r = d.n & ~d.p;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= RESET_VAL;
    else if (s)  state <= 1'b1;
    else if (r)  state <= 1'b0;
  end

  assign q = to_diff(state);

endmodule
