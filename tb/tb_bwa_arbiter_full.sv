// tb_bwa_arbiter_full -- the arbiter at its default parameters, long runs.
//
// The arbiter with all defaults (4 masters, 24-bit usage counters,
// largest-remainder rounding) goes through the five workloads of tb_bwa_env,
// 2,000,000 cycles each (10,000,000 in all), with every per-cycle check and
// the final one-percentage-point check of each master's share. The 24-bit
// counters do not fill within a workload, so no rescale is required here; the
// reduced-width test covers it.
module tb_bwa_arbiter_full;
  import bwa_pkg::*;

  localparam int N     = 4;
  localparam int CNT_W = 24;

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

  bwa_arbiter_top dut (
    .clk(clk), .rst_n(rst_n), .req(req), .lock(lock), .hready(hready),
    .count_en(count_en), .target(target), .grant(grant), .master(master),
    .hmaster(hmaster), .usage(usage), .share(share), .diff(diff),
    .prio(prio), .rescale(rescale)
  );

  tb_bwa_env #(
    .N(N), .CNT_W(CNT_W), .CYCLES(2000000), .FIRST_WL(0), .LAST_WL(4),
    .TOL_PCT(1), .REQUIRE_RESCALE(1'b0), .WATCHDOG(12000000)
  ) env (
    .clk(clk), .rst_n(rst_n), .req(req), .lock(lock), .hready(hready),
    .count_en(count_en), .target(target), .grant(grant), .master(master),
    .hmaster(hmaster), .usage(usage), .share(share), .diff(diff),
    .prio(prio), .rescale(rescale)
  );

endmodule
