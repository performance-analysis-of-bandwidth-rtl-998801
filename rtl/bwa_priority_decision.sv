// bwa_priority_decision -- turns the difference values into bus priorities.
//
// The master with the largest difference (furthest below its target share)
// gets priority 1, the next one 2, and so on up to N. When two differences
// are equal, the preset master order decides: TIE_ORDER[x] is the tie rank
// of master x, and the lower tie rank comes first (the entries for masters
// 0..N-1 must differ). By default the tie rank is the master index. Every master gets a distinct priority, so `prio` is always a
// permutation of 1..N. Combinational; the arbiter registers the result so
// that it applies to the requests of the next cycle.
//
// Ranking by difference, with an order on ties set in advance by master type,
// follows the arbiter's description; making that order a parameter with the
// master index as default is this design's choice. The default matches every
// tie in the worked example (masters 0 and 2 both at 0 rank 0 before 2).
module bwa_priority_decision
  import bwa_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter tie_order_t  TIE_ORDER = TIE_BY_INDEX
) (
  input  diff_t [N-1:0]                   diff,
  output logic  [N-1:0][$clog2(N+1)-1:0]  prio   // 1 = highest
);

  localparam int unsigned RANK_W = $clog2(N+1);

  always_comb begin
    for (int x = 0; x < N; x++) begin
      prio[x] = RANK_W'(1);
      for (int j = 0; j < N; j++) begin
        if (j != x && ((diff[j] > diff[x]) || (diff[j] == diff[x] && TIE_ORDER[j] < TIE_ORDER[x]))) begin
          prio[x] += RANK_W'(1);
        end
      end
    end
  end

endmodule
