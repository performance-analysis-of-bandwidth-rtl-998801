// tb_bwa_ref_pkg -- reference arithmetic for the bandwidth-aware arbiter tests.
//
// Plain integer models, written independently of the RTL, of the three
// computations the arbiter chains together:
//   ref_shares: share of each count in percent. Largest-remainder rounding:
//     truncate, then the missing points go one each to the largest
//     remainders, earlier index first on equal remainders (done here by a
//     selection loop, not by ranking). Half-up rounding as an option.
//   ref_prio:   priority 1..N, largest difference first, earlier index first
//     on equal differences (done here by repeatedly taking the maximum);
//     ref_prio_order takes any preset tie order instead of the index.
//   ref_winner: index of the requesting master with the smallest priority.
package tb_bwa_ref_pkg;

  localparam int MAXN = 16;

  typedef int          int_arr_t [MAXN];
  typedef longint      long_arr_t[MAXN];

  function automatic int_arr_t ref_shares(input long_arr_t cnt, input int n,
                                          input bit half_up);
    int_arr_t  pct;
    long_arr_t rem;
    bit        taken [MAXN];
    longint    total;
    int        missing;
    total = 0;
    for (int i = 0; i < n; i++) total += cnt[i];
    for (int i = 0; i < MAXN; i++) begin
      pct[i] = 0;
      rem[i] = 0;
      taken[i] = 1'b0;
    end
    if (total == 0) return pct;
    missing = 100;
    for (int i = 0; i < n; i++) begin
      pct[i] = int'((cnt[i] * 100) / total);
      rem[i] = (cnt[i] * 100) % total;
      missing -= pct[i];
    end
    if (half_up) begin
      for (int i = 0; i < n; i++) if (2 * rem[i] >= total) pct[i] += 1;
      return pct;
    end
    for (int k = 0; k < missing; k++) begin
      int best;
      best = -1;
      for (int i = 0; i < n; i++) begin
        if (!taken[i] && (best < 0 || rem[i] > rem[best])) best = i;
      end
      taken[best] = 1'b1;
      pct[best] += 1;
    end
    return pct;
  endfunction

  function automatic int_arr_t ref_prio(input int_arr_t diff, input int n);
    int_arr_t idx;
    for (int i = 0; i < MAXN; i++) idx[i] = i;
    return ref_prio_order(diff, idx, n);
  endfunction

  // As ref_prio, with tie[i] the preset tie rank of master i (lower first).
  function automatic int_arr_t ref_prio_order(input int_arr_t diff,
                                              input int_arr_t tie, input int n);
    int_arr_t prio;
    bit       done [MAXN];
    for (int i = 0; i < MAXN; i++) begin
      prio[i] = 0;
      done[i] = 1'b0;
    end
    for (int r = 1; r <= n; r++) begin
      int best;
      best = -1;
      for (int i = 0; i < n; i++) begin
        if (!done[i] && (best < 0 || diff[i] > diff[best] ||
                          (diff[i] == diff[best] && tie[i] < tie[best]))) best = i;
      end
      done[best] = 1'b1;
      prio[best] = r;
    end
    return prio;
  endfunction

  function automatic int ref_winner(input logic [MAXN-1:0] req,
                                    input int_arr_t prio, input int n);
    int best;
    best = -1;
    for (int i = 0; i < n; i++) begin
      if (req[i] && (best < 0 || prio[i] < prio[best])) best = i;
    end
    return best;
  endfunction

endpackage
