// tb_bwa_proportion_calc -- self-checking test of the proportion stage.
//
// Two instances share the input counts: one with the default
// largest-remainder rounding, one rounding half up. First the worked example
// of the arbiter (usage counts and the percentages they must give, 40:30:20:10
// targets), then the all-zero case, then random counts, small and near the top
// of the 24-bit range, against the integer model in tb_bwa_ref_pkg. The
// default instance must also always add up to exactly 100.
module tb_bwa_proportion_calc;
  import bwa_pkg::*;
  import tb_bwa_ref_pkg::*;

  localparam int N     = 4;
  localparam int CNT_W = 24;

  logic [N-1:0][CNT_W-1:0] count;
  pct_t [N-1:0]            pct_lr;
  pct_t [N-1:0]            pct_hu;

  int checks = 0;
  int failures = 0;
  logic clk;

  bwa_proportion_calc dut_lr (.count(count), .pct(pct_lr));
  bwa_proportion_calc #(.N(N), .CNT_W(CNT_W), .ROUND_MODE(ROUND_HALF_UP))
    dut_hu (.count(count), .pct(pct_hu));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic apply_and_check(input long_arr_t c);
    int_arr_t e_lr, e_hu;
    int       sum;
    for (int i = 0; i < N; i++) count[i] = CNT_W'(c[i]);
    #1;
    e_lr = ref_shares(c, N, 1'b0);
    e_hu = ref_shares(c, N, 1'b1);
    sum = 0;
    for (int i = 0; i < N; i++) begin
      checks += 2;
      sum += int'(pct_lr[i]);
      if (int'(pct_lr[i]) != e_lr[i]) begin
        failures++;
        $display("FAIL largest-remainder m%0d count=%0d: got %0d expected %0d",
                 i, c[i], pct_lr[i], e_lr[i]);
      end
      if (int'(pct_hu[i]) != e_hu[i]) begin
        failures++;
        $display("FAIL half-up m%0d count=%0d: got %0d expected %0d",
                 i, c[i], pct_hu[i], e_hu[i]);
      end
    end
    checks++;
    if (c[0] + c[1] + c[2] + c[3] != 0 && sum != 100) begin
      failures++;
      $display("FAIL shares add up to %0d", sum);
    end
  endtask

  // Worked example: counts and the percentages they give.
  task automatic example(input int c0, c1, c2, c3, p0, p1, p2, p3);
    long_arr_t c;
    int        p [4];
    c = '{default: 0};
    c[0] = longint'(c0); c[1] = longint'(c1); c[2] = longint'(c2); c[3] = longint'(c3);
    p = '{p0, p1, p2, p3};
    apply_and_check(c);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(pct_lr[i]) != p[i]) begin
        failures++;
        $display("FAIL example %0d:%0d:%0d:%0d m%0d: got %0d expected %0d",
                 c0, c1, c2, c3, i, pct_lr[i], p[i]);
      end
    end
  endtask

  initial begin
    long_arr_t c;
    example(9, 7, 4, 3, 39, 31, 17, 13);
    example(9, 7, 5, 3, 38, 29, 21, 12);
    example(10, 7, 5, 3, 40, 28, 20, 12);
    example(10, 8, 5, 3, 38, 31, 19, 12);
    example(11, 8, 5, 3, 41, 30, 18, 11);
    example(11, 8, 6, 3, 39, 29, 21, 11);
    example(40, 30, 20, 10, 40, 30, 20, 10);
    example(0, 0, 0, 0, 0, 0, 0, 0);
    example(5, 0, 0, 0, 100, 0, 0, 0);
    example(1, 1, 1, 0, 34, 33, 33, 0);
    c = '{default: 0};
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < N; i++) begin
        case (k % 3)
          0: c[i] = longint'($urandom_range(0, 40));
          1: c[i] = longint'($urandom_range(0, 100000));
          default: c[i] = (longint'(1) << CNT_W) - 1 - longint'($urandom_range(0, 5000000));
        endcase
      end
      apply_and_check(c);
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
