// tb_saff_dff: self-checking testbench of the differential sense-amplifier flip-flop.
//
// Checks, against a reference value kept in the testbench:
//  - asynchronous reset loads RESET_VAL without a clock edge (both reset values are tested);
//  - a valid input pair is captured on the rising edge, and only there: q does not follow d
//    between edges, and the new value appears after exactly one edge;
//  - an input pair with equal rails leaves the stored bit unchanged;
//  - q is always a complementary pair.
// Clock period 10 ns; a watchdog ends the run with a failure after 5000 cycles.
module tb_saff_dff;
  import prbs_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  diff_t d0, d1, q0, q1;

  saff_dff #(.RESET_VAL(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .d(d0), .q(q0));
  saff_dff #(.RESET_VAL(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .d(d1), .q(q1));

  always #5 clk = ~clk;

  task automatic check_q(input diff_t q, input logic expected, input string what);
    checks++;
    if (q.p !== expected || q.n !== !expected) begin
      failures++;
      $display("FAIL %s: q=%0b/%0b expected %0b at %0t", what, q.p, q.n, expected, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ref0, ref1;
  logic v0, v1, prev0;
  int holds = 0;

  initial begin
    d0 = to_diff(1'b1);
    d1 = to_diff(1'b0);
    rst_n = 1'b1;
    @(negedge clk);
    // Asynchronous reset, applied and checked between clock edges.
    #1 rst_n = 1'b0;
    #1;
    check_q(q0, 1'b0, "reset dut0");
    check_q(q1, 1'b1, "reset dut1");
    @(posedge clk);
    #1;
    check_q(q0, 1'b0, "reset held dut0");
    check_q(q1, 1'b1, "reset held dut1");
    @(negedge clk);
    d0 = to_diff(1'b0);
    d1 = to_diff(1'b1);
    rst_n = 1'b1;
    ref0 = 1'b0;
    ref1 = 1'b1;

    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // q must still show the previous value before the edge.
      check_q(q0, ref0, "hold before edge dut0");
      prev0 = ref0;
      v0 = 1'($urandom);
      v1 = 1'($urandom);
      if (($urandom % 8) == 0) begin
        // Invalid pair: both rails equal, the latch must hold.
        d0 = '{p: v0, n: v0};
        holds++;
      end else begin
        d0 = to_diff(v0);
        ref0 = v0;
      end
      d1 = to_diff(v1);
      ref1 = v1;
      #2;
      check_q(q0, prev0, "no change mid-cycle dut0");
      @(posedge clk);
      #1;
      check_q(q0, ref0, "capture dut0");
      check_q(q1, ref1, "capture dut1");
    end

    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL: no invalid input pair was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
