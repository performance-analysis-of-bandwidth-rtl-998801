// tb_bwa_arbitration -- self-checking test of the arbitration block.
//
// Drives random requests, locks, HREADY and priority permutations into a
// 4-master arbitration block and keeps a cycle model of the grant and bus
// owner registers: the grant moves to the best-priority requester when HREADY
// is high and the grantee is not holding the bus with its lock, and stays put
// otherwise or with no request; the owner copies the grant on HREADY. Directed
// cycles first check reset to master 0, a single request taking the bus
// against better priorities, two requests decided by the priorities, a lock
// and HREADY low.
module tb_bwa_arbitration;
  import bwa_pkg::*;
  import tb_bwa_ref_pkg::*;

  localparam int N = 4;
  localparam int RANK_W = $clog2(N + 1);

  logic                      clk;
  logic                      rst_n;
  logic [N-1:0]              req;
  logic [N-1:0]              lock;
  logic                      hready;
  logic [N-1:0][RANK_W-1:0]  prio;
  logic [N-1:0]              grant;
  logic [N-1:0]              master;
  logic [HMASTER_W-1:0]      hmaster;

  int checks = 0;
  int failures = 0;
  int m_grant = 0;   // model: index of grantee
  int m_owner = 0;   // model: index of bus owner

  bwa_arbitration dut (
    .clk(clk), .rst_n(rst_n), .req(req), .lock(lock), .hready(hready),
    .prio(prio), .grant(grant), .master(master), .hmaster(hmaster)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic set_prio(input int p[4]);
    for (int i = 0; i < N; i++) prio[i] = RANK_W'(p[i]);
  endtask

  // One clock: update the model from the inputs, then compare.
  task automatic cycle();
    int_arr_t pp;
    int       w;
    bit       hold;
    pp = '{default: 0};
    for (int i = 0; i < N; i++) pp[i] = int'(prio[i]);
    hold = req[m_grant] && lock[m_grant];
    w = ref_winner(MAXN'(req), pp, N);
    @(posedge clk);
    #1;
    if (hready) m_owner = m_grant;
    if (hready && !hold && w >= 0) m_grant = w;
    check("grant", int'(grant), 1 << m_grant);
    check("master", int'(master), 1 << m_owner);
    check("hmaster", int'(hmaster), m_owner);
  endtask

  initial begin
    rst_n = 1'b0;
    req = '0;
    lock = '0;
    hready = 1'b1;
    set_prio('{1, 2, 3, 4});
    repeat (2) @(posedge clk);
    #1;
    check("reset grant", int'(grant), 1);
    check("reset master", int'(master), 1);
    rst_n = 1'b1;
    // A lone request of the worst-priority master still wins.
    req = 4'b1000;
    set_prio('{1, 2, 3, 4});
    cycle();
    check("lone request", int'(grant), 'b1000);
    cycle();
    check("owner follows", int'(hmaster), 3);
    // Masters 1 and 2 request; priority 2 1 ... selects master 2.
    req = 4'b0110;
    set_prio('{2, 3, 1, 4});
    cycle();
    check("priority decides", int'(grant), 'b0100);
    // Master 2 locks: master 1 gets better priority but must wait.
    lock = 4'b0100;
    set_prio('{2, 1, 3, 4});
    cycle();
    check("lock holds", int'(grant), 'b0100);
    lock = 4'b0000;
    hready = 1'b0;
    cycle();
    check("hready low holds", int'(grant), 'b0100);
    hready = 1'b1;
    cycle();
    check("hand over", int'(grant), 'b0010);
    req = '0;
    cycle();
    check("park", int'(grant), 'b0010);
    for (int k = 0; k < 5000; k++) begin
      int p[4];
      p = '{1, 2, 3, 4};
      p.shuffle();
      set_prio(p);
      req = N'($urandom);
      lock = N'($urandom) & N'($urandom);
      hready = ($urandom_range(0, 9) != 0);
      cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
