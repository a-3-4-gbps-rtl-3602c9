// tb_cml_xor: self-checking testbench of the differential XOR gate.
//
// Applies all four valid combinations of the two differential inputs, then random valid
// combinations, and checks that the output pair carries A xor B (truth table written out here)
// and that its rails are complementary. Runs a few hundred steps of 1 ns; a watchdog ends the
// run with a failure if it does not finish in time.
module tb_cml_xor;
  import prbs_pkg::*;

  int checks = 0;
  int failures = 0;

  diff_t a, b, y;

  cml_xor dut (.a(a), .b(b), .y(y));

  // Truth table of XOR, indexed by {a, b}.
  localparam logic [3:0] XOR_TT = 4'b0110;

  task automatic apply_and_check(input logic av, input logic bv);
    logic expected;
    a = '{p: av, n: !av};
    b = '{p: bv, n: !bv};
    #1;
    expected = XOR_TT[{av, bv}];
    checks++;
    if (y.p !== expected) begin
      failures++;
      $display("FAIL: a=%0b b=%0b y.p=%0b expected %0b", av, bv, y.p, expected);
    end
    checks++;
    if (y.n !== !expected) begin
      failures++;
      $display("FAIL: a=%0b b=%0b y.n=%0b expected %0b", av, bv, y.n, !expected);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) apply_and_check(i[1], i[0]);
    for (int i = 0; i < 200; i++) apply_and_check(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
