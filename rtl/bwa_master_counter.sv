// bwa_master_counter -- bus usage counter of one master.
//
// Counts the HCLK cycles in which its master owns the bus: `inc` is the
// master's one-hot bus-owner bit (HMASTER == x), optionally qualified by the
// bus being in use. The count is what the proportion stage divides by the
// total of all masters.
//
// The counter itself follows the block diagram of the bandwidth-aware
// arbiter (one counter per master, fed by the clock and by that master's
// bus-owner signal). What happens at the top of the range is this design's
// own choice: when any counter of the arbiter is full, the arbiter asserts
// `halve` to every counter at once, and each one stores half of its next
// value. Halving all counts together keeps their ratios, so the measured
// shares survive the rescale; `full` tells the arbiter that this counter
// reached its maximum.
//
// Timing: one register, updated on the rising edge of clk; `count` and `full`
// are the registered values. Reset (rst_n low, synchronous) clears it.
module bwa_master_counter #(
  parameter int unsigned CNT_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,    // master owns the bus this cycle
  input  logic             halve,  // rescale: keep half of the next value
  output logic [CNT_W-1:0] count,
  output logic             full    // count is at its maximum
);

  logic [CNT_W:0] next_count;

  assign next_count = {1'b0, count} + (CNT_W+1)'(inc);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
    end else if (halve) begin
      count <= next_count[CNT_W:1];
    end else begin
      count <= next_count[CNT_W-1:0];
    end
  end

  assign full = &count;

  // Without a rescale the counter must never wrap.
  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
                              (full && inc) |-> halve)
    else $error("usage counter would wrap without a rescale");

endmodule
