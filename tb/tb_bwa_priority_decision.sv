// tb_bwa_priority_decision -- self-checking test of the priority decision.
//
// Applies the difference rows of the arbiter's worked example and expects the
// printed priorities (ties between equal differences go to the lower master
// index), then random differences, with many ties, checked against the
// selection model in tb_bwa_ref_pkg. Every output must be a permutation of
// 1..N. A second instance is given the reversed preset tie order (master 3
// first) and checked the same way.
module tb_bwa_priority_decision;
  import bwa_pkg::*;
  import tb_bwa_ref_pkg::*;

  localparam int N = 4;
  localparam int RANK_W = $clog2(N + 1);

  diff_t [N-1:0]             diff;
  logic  [N-1:0][RANK_W-1:0] prio;
  logic  [N-1:0][RANK_W-1:0] prio_rev;

  // Tie ranks 3, 2, 1, 0 for masters 0..3.
  localparam tie_order_t REVERSED = 64'hFEDC_BA98_7654_0123;

  int checks = 0;
  int failures = 0;
  logic clk;

  bwa_priority_decision dut (.diff(diff), .prio(prio));
  bwa_priority_decision #(.TIE_ORDER(REVERSED)) dut_rev (.diff(diff), .prio(prio_rev));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic row(input int d[4], input int p[4]);
    int_arr_t dd, rr, tie;
    int seen;
    for (int i = 0; i < N; i++) diff[i] = diff_t'(d[i]);
    #1;
    seen = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(prio[i]) != p[i]) begin
        failures++;
        $display("FAIL diffs %0d %0d %0d %0d: m%0d priority %0d expected %0d",
                 d[0], d[1], d[2], d[3], i, prio[i], p[i]);
      end
      if (int'(prio[i]) >= 1 && int'(prio[i]) <= N) seen |= (1 << int'(prio[i]));
    end
    dd = '{default: 0};
    tie = '{default: 0};
    for (int i = 0; i < N; i++) begin
      dd[i] = d[i];
      tie[i] = N - 1 - i;
    end
    rr = ref_prio_order(dd, tie, N);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(prio_rev[i]) != rr[i]) begin
        failures++;
        $display("FAIL reversed ties, diffs %0d %0d %0d %0d: m%0d priority %0d expected %0d",
                 d[0], d[1], d[2], d[3], i, prio_rev[i], rr[i]);
      end
    end
    checks++;
    if (seen != 'b11110) begin
      failures++;
      $display("FAIL priorities are not a permutation of 1..%0d", N);
    end
  endtask

  initial begin
    row('{1, -1, 3, -3}, '{2, 3, 1, 4});
    row('{2, 1, -1, -2}, '{1, 2, 3, 4});
    row('{0, 2, 0, -2}, '{2, 1, 3, 4});
    row('{2, -1, 1, -2}, '{1, 3, 2, 4});
    row('{-1, 0, 2, -1}, '{3, 2, 1, 4});
    row('{1, 1, -1, -1}, '{1, 2, 3, 4});
    row('{0, 0, 0, 0}, '{1, 2, 3, 4});
    checks++;
    if (prio_rev != {3'd1, 3'd2, 3'd3, 3'd4}) begin
      failures++;
      $display("FAIL reversed ties on all-equal differences");
    end
    row('{-100, 100, -100, 100}, '{3, 1, 4, 2});
    for (int k = 0; k < 3000; k++) begin
      int d[4];
      int_arr_t dd, pp;
      dd = '{default: 0};
      for (int i = 0; i < N; i++) begin
        d[i] = (k % 2 == 0) ? int'($urandom_range(0, 4)) - 2
                            : int'($urandom_range(0, 200)) - 100;
        dd[i] = d[i];
      end
      pp = ref_prio(dd, N);
      row(d, '{pp[0], pp[1], pp[2], pp[3]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
