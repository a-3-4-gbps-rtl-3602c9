// prbs_pkg: types and constants shared by the PRBS-7 generator and its testbenches.
//
// A differential signal is carried as a pair of rails, p (the "+" wire) and n (the "-" wire).
// In a valid logic level the two rails are complementary; the value of the pair is its p rail.
// The constants describe the main configuration: a 7-stage register with its feedback tap at
// stage 3, i.e. the polynomial P(x) = x^7 + x^3 + 1, whose maximal-length sequence repeats
// every 2^7 - 1 = 127 clocks.
package prbs_pkg;

  typedef struct packed {
    logic p;  // positive rail (OUT+, A+, DIN+ ...)
    logic n;  // negative rail (OUT-, A-, DIN- ...)
  } diff_t;

  localparam int unsigned PRBS_LEN = 7;
  localparam int unsigned PRBS_TAP = 3;
  localparam int unsigned PRBS_PERIOD = (1 << PRBS_LEN) - 1;

  // Drive a complementary pair from one logic value.
  function automatic diff_t to_diff(input logic v);
    to_diff = '{p: v, n: ~v};
  endfunction

  // A pair is a valid logic level when its rails differ.
  function automatic logic diff_valid(input diff_t d);
    diff_valid = d.p ^ d.n;
  endfunction

endpackage
