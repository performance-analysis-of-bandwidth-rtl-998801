// tb_bwa_difference_calc -- self-checking test of the difference stage.
//
// Applies the worked example of the arbiter (targets 40:30:20:10 against the
// measured shares, expecting the printed differences), the extremes 0-100 and
// 100-0, and random target/share pairs checked against target - share.
module tb_bwa_difference_calc;
  import bwa_pkg::*;

  localparam int N = 4;

  pct_t  [N-1:0] target;
  pct_t  [N-1:0] pct;
  diff_t [N-1:0] diff;

  int checks = 0;
  int failures = 0;
  logic clk;

  bwa_difference_calc dut (.target(target), .pct(pct), .diff(diff));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic row(input int t[4], input int p[4], input int d[4]);
    for (int i = 0; i < N; i++) begin
      target[i] = pct_t'(t[i]);
      pct[i]    = pct_t'(p[i]);
    end
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(diff[i]) != d[i]) begin
        failures++;
        $display("FAIL m%0d: %0d - %0d gave %0d expected %0d",
                 i, t[i], p[i], diff[i], d[i]);
      end
    end
  endtask

  initial begin
    int t[4];
    t = '{40, 30, 20, 10};
    row(t, '{39, 31, 17, 13}, '{1, -1, 3, -3});
    row(t, '{38, 29, 21, 12}, '{2, 1, -1, -2});
    row(t, '{40, 28, 20, 12}, '{0, 2, 0, -2});
    row(t, '{38, 31, 19, 12}, '{2, -1, 1, -2});
    row(t, '{41, 30, 18, 11}, '{-1, 0, 2, -1});
    row(t, '{39, 29, 21, 11}, '{1, 1, -1, -1});
    row(t, '{40, 30, 20, 10}, '{0, 0, 0, 0});
    row('{0, 100, 50, 0}, '{100, 0, 50, 0}, '{-100, 100, 0, 0});
    for (int k = 0; k < 2000; k++) begin
      int tr[4], pr[4], dr[4];
      for (int i = 0; i < N; i++) begin
        tr[i] = $urandom_range(0, 100);
        pr[i] = $urandom_range(0, 100);
        dr[i] = tr[i] - pr[i];
      end
      row(tr, pr, dr);
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
