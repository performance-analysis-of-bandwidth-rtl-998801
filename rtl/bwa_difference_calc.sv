// bwa_difference_calc -- how far each master is below its target share.
//
// diff[x] = target[x] - pct[x], a signed number of percentage points. A
// positive value means master x has had less of the bus than it was given; a
// negative value means it has had more. Combinational.
//
// The subtraction and its sign follow the arbiter's worked example (target
// 40, measured 39 gives +1). `target` holds the standard proportions a user
// sets for the masters; this design takes them as inputs and does not check
// that they add up to 100.
module bwa_difference_calc
  import bwa_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  pct_t  [N-1:0] target,
  input  pct_t  [N-1:0] pct,
  output diff_t [N-1:0] diff
);

  always_comb begin
    for (int x = 0; x < N; x++) begin
      diff[x] = diff_t'({1'b0, target[x]}) - diff_t'({1'b0, pct[x]});
    end
  end

endmodule
