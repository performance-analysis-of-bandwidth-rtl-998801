// tb_bwa_traffic_master -- behavioural bus master that generates random traffic.
//
// Test-only model of a bus master (a CPU, DMA or Ethernet MAC port as seen by
// the arbiter). It alternates between idle gaps and bursts: an idle gap of a
// random 0..2*IDLE_AVG cycles, then a request for a burst of BURST beats, or,
// with BURST = 0, of 1, 4, 8 or 16 beats picked at random. While requesting
// it raises `req`; it also raises `lock` while more than two beats are left,
// so that it keeps the bus for its burst but lets the arbiter decide the next
// owner in time for a seamless hand-over. One beat completes in each cycle in
// which it owns the bus (`owner`) and `hready` is high; `busy` marks cycles in
// which it owns the bus and has a beat to move, which is what the arbiter's
// counters should count.
//
// It also measures the request wait: the cycles from raising `req` to the
// first cycle of owning the bus, as sum, count and maximum.
module tb_bwa_traffic_master #(
  parameter int IDLE_AVG = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  int   burst,     // beats per burst, 0 = random 1/4/8/16
  input  logic owner,
  input  logic hready,
  output logic req,
  output logic lock,
  output logic busy,
  output longint wait_sum,
  output int     wait_n,
  output int     wait_max
);

  int  beats_left;
  int  idle_left;
  int  waiting;
  bit  started;

  function automatic int new_burst(input int b);
    int pick;
    if (b > 0) return b;
    pick = $urandom_range(0, 3);
    return (pick == 0) ? 1 : (pick == 1) ? 4 : (pick == 2) ? 8 : 16;
  endfunction

  assign req  = (beats_left > 0);
  assign lock = (beats_left > 2);
  assign busy = owner && (beats_left > 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beats_left <= 0;
      idle_left  <= $urandom_range(0, 2 * IDLE_AVG);
      waiting    <= 0;
      started    <= 1'b0;
      wait_sum   <= 0;
      wait_n     <= 0;
      wait_max   <= 0;
    end else if (beats_left > 0) begin
      if (owner && !started) begin
        started  <= 1'b1;
        wait_sum <= wait_sum + longint'(waiting);
        wait_n   <= wait_n + 1;
        if (waiting > wait_max) wait_max <= waiting;
      end else if (!owner && !started) begin
        waiting <= waiting + 1;
      end
      if (owner && hready) begin
        beats_left <= beats_left - 1;
        if (beats_left == 1) idle_left <= $urandom_range(0, 2 * IDLE_AVG);
      end
    end else if (idle_left > 0) begin
      idle_left <= idle_left - 1;
    end else begin
      beats_left <= new_burst(burst);
      waiting    <= 0;
      started    <= 1'b0;
    end
  end

endmodule
