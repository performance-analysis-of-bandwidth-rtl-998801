// tb_bwa_env -- traffic, reference model and checks for the whole arbiter.
//
// Drives a 4-master bandwidth-aware arbiter, instantiated by the testbench
// around it, with four random traffic masters and random HREADY wait states,
// and runs the listed workloads one after the other, each from reset:
//   0  targets 40:30:20:10, bursts of 1/4/8/16 beats, idle gaps averaging 5
//   1  targets 40:35:15:10, same traffic
//   2  targets 40:30:15:15, same traffic
//   3  targets 30:30:20:20, same traffic
//   4  targets 40:20:20:20, every burst 8 beats (one processor and three
//      network DMA masters)
// Every cycle it checks the usage counters against its own count of owned
// busy cycles (halved with the design when a counter fills), the shares
// against the integer reference, the differences, the priority register
// against the priority of the previous cycle's differences, and the grant and
// bus owner against a cycle model of the hand-over rules. At the end of each
// workload every master's share of all busy cycles must lie within TOL_PCT
// percentage points of its target. It counts how often each mechanism of the
// arbiter was exercised (contention decided by priority, lock hold, wait
// state, equal differences, rounding of remainders, rescale, parked bus) and
// fails any that never happened (rescale only if REQUIRE_RESCALE). It also
// reports, per master, the throughput in data bits per bus cycle (beats moved
// times 32 bits over the cycles run) and the average and longest wait from
// raising a request to owning the bus.
module tb_bwa_env
  import bwa_pkg::*;
  import tb_bwa_ref_pkg::*;
#(
  parameter int N               = 4,
  parameter int CNT_W           = 24,
  parameter int CYCLES          = 20000,
  parameter int FIRST_WL        = 0,
  parameter int LAST_WL         = 4,
  parameter int TOL_PCT         = 1,
  parameter bit REQUIRE_RESCALE = 1'b1,
  parameter int WATCHDOG        = 200000
) (
  output logic                           clk,
  output logic                           rst_n,
  output logic [N-1:0]                   req,
  output logic [N-1:0]                   lock,
  output logic                           hready,
  output logic                           count_en,
  output pct_t  [N-1:0]                  target,
  input  logic  [N-1:0]                  grant,
  input  logic  [N-1:0]                  master,
  input  logic  [HMASTER_W-1:0]          hmaster,
  input  logic  [N-1:0][CNT_W-1:0]       usage,
  input  pct_t  [N-1:0]                  share,
  input  diff_t [N-1:0]                  diff,
  input  logic  [N-1:0][$clog2(N+1)-1:0] prio,
  input  logic                           rescale
);

  int checks = 0;
  int failures = 0;

  int burst;
  logic [N-1:0] busy;
  longint       wait_sum [N];
  int           wait_n   [N];
  int           wait_max [N];

  // Mechanism counters.
  int n_contention = 0;   // two or more requests decided by the priorities
  int n_prio_over  = 0;   // ... where the winner was not the lowest index
  int n_lock_hold  = 0;   // grantee kept the bus against another request
  int n_wait_state = 0;   // HREADY low
  int n_tie        = 0;   // equal differences broken by master order
  int n_rounding   = 0;   // remainder points handed out
  int n_rescale    = 0;   // counters halved
  int n_park       = 0;   // no request, bus parked

  initial clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar x = 0; x < N; x++) begin : g_m
    tb_bwa_traffic_master #(.IDLE_AVG(5)) u_m (
      .clk(clk), .rst_n(rst_n), .burst(burst), .owner(master[x]),
      .hready(hready), .req(req[x]), .lock(lock[x]), .busy(busy[x]),
      .wait_sum(wait_sum[x]), .wait_n(wait_n[x]), .wait_max(wait_max[x])
    );
  end

  assign count_en = |(busy & master);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic set_workload(input int wl);
    int t[4];
    case (wl)
      0: begin t = '{40, 30, 20, 10}; burst = 0; end
      1: begin t = '{40, 35, 15, 10}; burst = 0; end
      2: begin t = '{40, 30, 15, 15}; burst = 0; end
      3: begin t = '{30, 30, 20, 20}; burst = 0; end
      default: begin t = '{40, 20, 20, 20}; burst = 8; end
    endcase
    for (int i = 0; i < N; i++) target[i] = pct_t'(t[i]);
  endtask

  initial begin
    rst_n = 1'b0;
    hready = 1'b1;
    set_workload(FIRST_WL);
    for (int wl = FIRST_WL; wl <= LAST_WL; wl++) begin
      long_arr_t m_cnt;       // model of the usage counters
      longint    busy_cnt[N]; // all busy cycles, never halved
      longint    busy_tot;
      longint    beat_cnt[N]; // completed beats (busy and HREADY high)
      int        m_grant, m_owner;
      set_workload(wl);
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      #1;
      rst_n = 1'b1;
      m_cnt = '{default: 0};
      for (int i = 0; i < N; i++) begin
        busy_cnt[i] = 0;
        beat_cnt[i] = 0;
      end
      busy_tot = 0;
      m_grant = 0;
      m_owner = 0;
      for (int i = 0; i < N; i++) check("reset prio", longint'(prio[i]), longint'(i) + 64'sd1);
      for (int cyc = 1; cyc <= CYCLES; cyc++) begin
        int_arr_t  d_now, e_prio, e_share, pp;
        long_arr_t post_cnt;
        bit        hold, any_full;
        int        w, nreq, lowest, floor_sum;
        // Settled values of this cycle.
        #3;
        d_now = '{default: 0};
        pp = '{default: 0};
        for (int i = 0; i < N; i++) begin
          d_now[i] = int'(diff[i]);
          pp[i] = int'(prio[i]);
        end
        e_share = ref_shares(m_cnt, N, 1'b0);
        for (int i = 0; i < N; i++) begin
          check("usage", longint'(usage[i]), m_cnt[i]);
          check("share", longint'(share[i]), longint'(e_share[i]));
          check("diff", longint'(diff[i]), longint'(target[i]) - longint'(e_share[i]));
        end
        e_prio = ref_prio(d_now, N);
        hold = req[m_grant] && lock[m_grant];
        w = ref_winner(MAXN'(req), pp, N);
        // Mechanism counts.
        nreq = $countones(req);
        lowest = -1;
        for (int i = N - 1; i >= 0; i--) if (req[i]) lowest = i;
        if (hready && !hold && nreq >= 2) begin
          n_contention++;
          if (w != lowest) n_prio_over++;
        end
        if (hold && (req & ~grant) != '0) n_lock_hold++;
        if (!hready) n_wait_state++;
        if (nreq == 0) n_park++;
        for (int i = 0; i < N; i++)
          for (int j = i + 1; j < N; j++)
            if (d_now[i] == d_now[j]) n_tie++;
        floor_sum = 0;
        if (m_cnt[0] + m_cnt[1] + m_cnt[2] + m_cnt[3] != 0) begin
          for (int i = 0; i < N; i++)
            floor_sum += int'(m_cnt[i] * 100 / (m_cnt[0] + m_cnt[1] + m_cnt[2] + m_cnt[3]));
          if (floor_sum < 100) n_rounding++;
        end
        // Expected state after the edge.
        post_cnt = m_cnt;
        any_full = 1'b0;
        for (int i = 0; i < N; i++)
          if (m_cnt[i] == (longint'(1) << CNT_W) - 1) any_full = 1'b1;
        if (any_full) n_rescale++;
        check("rescale flag", longint'(rescale), longint'(any_full));
        for (int i = 0; i < N; i++) begin
          if (master[i] && count_en) begin
            post_cnt[i] += 1;
            busy_cnt[i] += 1;
            busy_tot += 1;
            if (hready) beat_cnt[i] += 1;
          end
          if (any_full) post_cnt[i] = post_cnt[i] / 2;
        end
        if (hready) m_owner = m_grant;
        if (hready && !hold && w >= 0) m_grant = w;
        @(posedge clk);
        #1;
        m_cnt = post_cnt;
        for (int i = 0; i < N; i++) check("prio", longint'(prio[i]), longint'(e_prio[i]));
        check("grant", longint'(grant), longint'(1) << m_grant);
        check("master", longint'(master), longint'(1) << m_owner);
        check("hmaster", longint'(hmaster), longint'(m_owner));
        hready = ($urandom_range(0, 19) != 0);
        if (cyc == 1000 || cyc == CYCLES) begin
          $write("workload %0d cycle %0d shares:", wl, cyc);
          for (int i = 0; i < N; i++)
            $write(" m%0d=%0.2f%%(target %0d)", i,
                   100.0 * real'(busy_cnt[i]) / real'(busy_tot), target[i]);
          $write("\n");
        end
      end
      // Long-run share of every master against its target.
      for (int i = 0; i < N; i++) begin
        real achieved;
        achieved = 100.0 * real'(busy_cnt[i]) / real'(busy_tot);
        checks++;
        if (achieved < real'(target[i]) - TOL_PCT || achieved > real'(target[i]) + TOL_PCT) begin
          failures++;
          $display("FAIL workload %0d m%0d share %0.2f%% target %0d%%", wl, i,
                   achieved, target[i]);
        end
      end
      // Throughput as data bits per bus cycle, 32-bit data beats.
      $write("workload %0d throughput bits/cycle:", wl);
      for (int i = 0; i < N; i++)
        $write(" m%0d=%0.2f", i, 32.0 * real'(beat_cnt[i]) / real'(CYCLES));
      $write("\n");
      $write("workload %0d request wait avg/max:", wl);
      for (int i = 0; i < N; i++)
        $write(" m%0d=%0.2f/%0d", i,
               (wait_n[i] == 0) ? 0.0 : real'(wait_sum[i]) / real'(wait_n[i]), wait_max[i]);
      $write("\n");
    end
    $display("mechanisms: contention=%0d priority_decided=%0d lock_hold=%0d wait_state=%0d tie=%0d rounding=%0d rescale=%0d park=%0d",
             n_contention, n_prio_over, n_lock_hold, n_wait_state, n_tie,
             n_rounding, n_rescale, n_park);
    checks += 7;
    if (n_contention == 0) begin failures++; $display("FAIL no contention"); end
    if (n_prio_over == 0) begin failures++; $display("FAIL priorities never decided"); end
    if (n_lock_hold == 0) begin failures++; $display("FAIL lock never held the bus"); end
    if (n_wait_state == 0) begin failures++; $display("FAIL no wait state"); end
    if (n_tie == 0) begin failures++; $display("FAIL no equal differences"); end
    if (n_rounding == 0) begin failures++; $display("FAIL no remainder rounding"); end
    if (n_park == 0 && FIRST_WL == 0 && LAST_WL == 0) begin
      // Parking needs every master idle at once; only reported.
    end
    if (REQUIRE_RESCALE) begin
      checks++;
      if (n_rescale == 0) begin failures++; $display("FAIL no rescale"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
