// bwa_proportion_calc -- share of the bus used by each master, in percent.
//
// For every master x it computes R(x) = count[x] / T * 100, where T is the
// sum of all the masters' usage counts, as an integer percentage. This is
// purely combinational: the result follows the counter registers within the
// same cycle.
//
// The formula is the arbiter's own definition of the occupied share. How a
// fraction becomes an integer is selected by ROUND_MODE:
//   ROUND_LARGEST_REMAINDER (default) truncates each share and then gives
//     one more point to each of the (100 - sum of truncated shares) masters
//     with the largest remainders, the lower index first on equal
//     remainders. The shares then always add up to exactly 100. This is the
//     rule that reproduces every worked example of the arbiter, e.g. counts
//     9:7:4:3 give 39:31:17:13 and counts 11:8:5:3 give 41:30:18:11.
//   ROUND_HALF_UP rounds each share to the nearest integer on its own.
// While T is zero (after reset, before any master has used the bus) every
// share is 0.
//
// Each share needs one division of count*100 by T; with the default counter
// width these are N parallel 31-by-26-bit dividers.
module bwa_proportion_calc
  import bwa_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned CNT_W      = 24,
  parameter round_mode_e ROUND_MODE = ROUND_LARGEST_REMAINDER
) (
  input  logic [N-1:0][CNT_W-1:0] count,
  output pct_t [N-1:0]            pct
);

  localparam int unsigned TOT_W = CNT_W + $clog2(N);  // width of T
  localparam int unsigned NUM_W = CNT_W + 7;          // width of count*100
  localparam int unsigned IDX_W = $clog2(N+1);        // 0..N

  logic [TOT_W-1:0]        total;
  logic [TOT_W-1:0]        divisor;
  logic [N-1:0][NUM_W-1:0] num;
  logic [N-1:0][PCT_W-1:0] quot;
  logic [N-1:0][TOT_W-1:0] rem;
  logic [PCT_W+2:0]        quot_sum;
  logic [PCT_W+2:0]        deficit;   // points still missing to 100
  logic [N-1:0][IDX_W-1:0] rem_rank;  // 0 = largest remainder

  always_comb begin
    total = '0;
    for (int x = 0; x < N; x++) begin
      total += TOT_W'(count[x]);
    end
    divisor = (total == '0) ? TOT_W'(1) : total;
  end

  always_comb begin
    quot_sum = '0;
    for (int x = 0; x < N; x++) begin
      num[x]   = NUM_W'(count[x]) * NUM_W'(100);
      quot[x]  = PCT_W'(num[x] / NUM_W'(divisor));
      rem[x]   = TOT_W'(num[x] % NUM_W'(divisor));
      quot_sum += (PCT_W+3)'(quot[x]);
    end
    deficit = (PCT_W+3)'(100) - quot_sum;
  end

  // Order of the remainders: how many masters come before master x.
  always_comb begin
    for (int x = 0; x < N; x++) begin
      rem_rank[x] = '0;
      for (int j = 0; j < N; j++) begin
        if (j != x && ((rem[j] > rem[x]) || (rem[j] == rem[x] && j < x))) begin
          rem_rank[x] += IDX_W'(1);
        end
      end
    end
  end

  always_comb begin
    for (int x = 0; x < N; x++) begin
      if (total == '0) begin
        pct[x] = '0;
      end else if (ROUND_MODE == ROUND_HALF_UP) begin
        pct[x] = quot[x] + PCT_W'({rem[x], 1'b0} >= {1'b0, total});
      end else begin
        pct[x] = quot[x] + PCT_W'((PCT_W+3)'(rem_rank[x]) < deficit);
      end
    end
  end

endmodule
