// bwa_arbiter_top -- bandwidth-aware bus arbiter for N masters.
//
// A conventional arbiter picks among simultaneous bus requests by a priority
// that ignores how much of the bus each master has already had. This one
// measures it and steers every master towards a share of the bus set by the
// user (`target`, in percent). The chain, one stage per block:
//
//   master counters      count, per master, the cycles it owned the bus
//   proportion calc      share of each master in percent of all counted cycles
//   difference calc      target share minus measured share
//   priority decision    rank 1..N, largest difference first, ties by the
//                        preset order TIE_ORDER (default: master index)
//   (priority register)  the ranks apply to the requests of the next cycle
//   arbitration block    grants the bus to the best-ranked requester
//
// and the owner the arbitration block reports (`master`) is what the counters
// count, closing the loop. A master that has had less than its share climbs in
// priority until it catches up, so over a run of cycles the measured shares
// settle on the targets whenever the masters ask for at least that much.
//
// Interface: AMBA-style requests (`req` = HBUSREQx, `lock` = HLOCKx, `hready`
// = HREADY) in, `grant` (HGRANTx) and bus owner (`master` one-hot, `hmaster`
// = HMASTER) out. `count_en` qualifies the counting: tie it high to count
// every cycle a master owns the bus, or drive it with "the bus is in use"
// (non-idle transfer or wait state) to leave parked idle cycles out. The
// counts, shares, differences and current priorities are brought out for
// observation.
//
// Timing: the counters, the priority register, `grant` and `master` are
// registers; proportion, difference and priority decision are combinational
// between the counters and the priority register. A bus cycle owned by master
// x in cycle k is counted at edge k, changes the priority register at edge
// k+1 and the grant at edge k+2 at the earliest.
//
// The stage structure, the percentage formula, the sign of the difference,
// ranking by difference and a preset tie order follow the arbiter's
// description. The counter width, the rescale of all counters by half when
// one is full, the rounding rule's hardware form, the hand-over rules
// (`hready`, `lock`) and `count_en` are this design's own choices.
module bwa_arbiter_top
  import bwa_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned CNT_W      = 24,
  parameter round_mode_e ROUND_MODE = ROUND_LARGEST_REMAINDER,
  parameter tie_order_t  TIE_ORDER  = TIE_BY_INDEX
) (
  input  logic                           clk,       // HCLK
  input  logic                           rst_n,     // HRESETn
  input  logic [N-1:0]                   req,
  input  logic [N-1:0]                   lock,
  input  logic                           hready,
  input  logic                           count_en,
  input  pct_t  [N-1:0]                  target,    // standard proportions
  output logic  [N-1:0]                  grant,
  output logic  [N-1:0]                  master,
  output logic  [HMASTER_W-1:0]          hmaster,
  output logic  [N-1:0][CNT_W-1:0]       usage,     // usage counts
  output pct_t  [N-1:0]                  share,     // measured shares
  output diff_t [N-1:0]                  diff,      // target - share
  output logic  [N-1:0][$clog2(N+1)-1:0] prio,      // priorities in use
  output logic                           rescale    // counters halved now
);

  localparam int unsigned RANK_W = $clog2(N+1);

  logic [N-1:0]             full;
  logic [N-1:0][RANK_W-1:0] prio_next;

  assign rescale = |full;

  for (genvar x = 0; x < N; x++) begin : g_cnt
    bwa_master_counter #(.CNT_W(CNT_W)) u_cnt (
      .clk   (clk),
      .rst_n (rst_n),
      .inc   (master[x] & count_en),
      .halve (rescale),
      .count (usage[x]),
      .full  (full[x])
    );
  end

  bwa_proportion_calc #(.N(N), .CNT_W(CNT_W), .ROUND_MODE(ROUND_MODE)) u_prop (
    .count (usage),
    .pct   (share)
  );

  bwa_difference_calc #(.N(N)) u_diff (
    .target (target),
    .pct    (share),
    .diff   (diff)
  );

  bwa_priority_decision #(.N(N), .TIE_ORDER(TIE_ORDER)) u_prio (
    .diff (diff),
    .prio (prio_next)
  );

  // The priorities decided in this cycle apply to the next cycle's requests.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int x = 0; x < N; x++) prio[x] <= RANK_W'(x + 1);
    end else begin
      prio <= prio_next;
    end
  end

  bwa_arbitration #(.N(N)) u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (req),
    .lock    (lock),
    .hready  (hready),
    .prio    (prio),
    .grant   (grant),
    .master  (master),
    .hmaster (hmaster)
  );

endmodule
