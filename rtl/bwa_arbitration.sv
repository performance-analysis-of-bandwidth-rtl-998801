// bwa_arbitration -- grants the shared bus by the bandwidth-aware priorities.
//
// Each cycle in which the bus may change hands, the block grants the bus to
// the requesting master with the best priority (1 = best) from the priority
// decision stage. With a single request the priorities do not matter; with
// two or more they decide. With no request the grant stays where it is (the
// bus is parked on the last owner). Outputs follow the AMBA arbiter
// convention: `grant` is the one-hot HGRANTx vector, and `master`/`hmaster`
// (HMASTER) show the owner of the current address phase, which takes over
// the granted master at the first clock edge with `hready` high.
//
// The grant may change hands only when `hready` is high and the current
// grantee is not holding the bus with `lock` (its request and lock both
// high, used for example for the length of a burst). These hand-over rules
// are this design's choice; the arbiter's description only fixes that the
// grant follows the priorities when several masters request.
//
// Timing: `grant` and `master` are registers. A request seen at edge k with
// the bus free gives `grant` at edge k, i.e. visible in cycle k+1, and
// `master` one `hready` edge later. Reset (synchronous, rst_n low) grants the bus to master 0.
module bwa_arbitration
  import bwa_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N-1:0]                   req,     // HBUSREQx
  input  logic [N-1:0]                   lock,    // HLOCKx: keep the bus
  input  logic                           hready,  // HREADY
  input  logic [N-1:0][$clog2(N+1)-1:0]  prio,    // 1 = highest
  output logic [N-1:0]                   grant,   // HGRANTx, one-hot
  output logic [N-1:0]                   master,  // bus owner, one-hot
  output logic [HMASTER_W-1:0]           hmaster  // bus owner, binary
);

  logic [N-1:0] winner;
  logic         hold;

  // Requesting master that no other requesting master beats.
  always_comb begin
    for (int x = 0; x < N; x++) begin
      winner[x] = req[x];
      for (int j = 0; j < N; j++) begin
        if (j != x && req[j] &&
            ((prio[j] < prio[x]) || (prio[j] == prio[x] && j < x))) begin
          winner[x] = 1'b0;
        end
      end
    end
  end

  assign hold = |(grant & req & lock);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant <= N'(1);
    end else if (hready && !hold && (|req)) begin
      grant <= winner;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      master <= N'(1);
    end else if (hready) begin
      master <= grant;
    end
  end

  always_comb begin
    hmaster = '0;
    for (int x = 0; x < N; x++) begin
      if (master[x]) hmaster = HMASTER_W'(x);
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                   $onehot(grant))
    else $error("grant is not one-hot");
  a_master_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                    $onehot(master))
    else $error("bus owner is not one-hot");

endmodule
