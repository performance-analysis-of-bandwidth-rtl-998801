// tb_bwa_arbiter_top -- end-to-end test of the bandwidth-aware arbiter.
//
// Runs the arbiter with 10-bit usage counters, so that the counters fill and
// are rescaled many times, through all five workloads of tb_bwa_env (four
// target ratios with random bursts and one processor-plus-three-DMA ratio with
// 8-beat bursts), 20,000 cycles each, with every per-cycle check and the
// final check that each master's share is within one percentage point of its
// target.
module tb_bwa_arbiter_top;
  import bwa_pkg::*;

  localparam int N     = 4;
  localparam int CNT_W = 10;

  logic                           clk;
  logic                           rst_n;
  logic  [N-1:0]                  req;
  logic  [N-1:0]                  lock;
  logic                           hready;
  logic                           count_en;
  pct_t  [N-1:0]                  target;
  logic  [N-1:0]                  grant;
  logic  [N-1:0]                  master;
  logic  [HMASTER_W-1:0]          hmaster;
  logic  [N-1:0][CNT_W-1:0]       usage;
  pct_t  [N-1:0]                  share;
  diff_t [N-1:0]                  diff;
  logic  [N-1:0][$clog2(N+1)-1:0] prio;
  logic                           rescale;

  bwa_arbiter_top #(.N(N), .CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .lock(lock), .hready(hready),
    .count_en(count_en), .target(target), .grant(grant), .master(master),
    .hmaster(hmaster), .usage(usage), .share(share), .diff(diff),
    .prio(prio), .rescale(rescale)
  );

  tb_bwa_env #(
    .N(N), .CNT_W(CNT_W), .CYCLES(20000), .FIRST_WL(0), .LAST_WL(4),
    .TOL_PCT(1), .REQUIRE_RESCALE(1'b1), .WATCHDOG(200000)
  ) env (
    .clk(clk), .rst_n(rst_n), .req(req), .lock(lock), .hready(hready),
    .count_en(count_en), .target(target), .grant(grant), .master(master),
    .hmaster(hmaster), .usage(usage), .share(share), .diff(diff),
    .prio(prio), .rescale(rescale)
  );

endmodule
