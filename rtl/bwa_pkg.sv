// bwa_pkg -- shared widths and types of the bandwidth-aware bus arbiter.
//
// Every bus share in the arbiter is an integer percentage 0..100 (pct_t).
// A difference between a target share and a measured share lies in
// -100..+100 (diff_t). The number of masters and the counter width are
// module parameters; only these fixed-size quantities live here.
package bwa_pkg;

  // Width of a percentage 0..100.
  localparam int unsigned PCT_W = 7;
  // Width of a signed difference -100..+100.
  localparam int unsigned DIFF_W = 8;
  // Width of the binary bus-owner number, as in the AMBA HMASTER[3:0] signal.
  localparam int unsigned HMASTER_W = 4;

  // Preset order among masters with equal differences: entry x is the tie
  // rank of master x (lower wins). Room for up to 16 masters.
  typedef logic [15:0][3:0] tie_order_t;
  localparam tie_order_t TIE_BY_INDEX = 64'hFEDC_BA98_7654_3210;

  typedef logic [PCT_W-1:0] pct_t;
  typedef logic signed [DIFF_W-1:0] diff_t;

  // How a share that is not a whole percentage is made one.
  //   ROUND_LARGEST_REMAINDER: truncate every share, then hand the points
  //     still missing to 100 to the shares with the largest remainders
  //     (lower master index first on equal remainders); the shares always
  //     add up to 100.
  //   ROUND_HALF_UP: round every share to the nearest integer on its own.
  typedef enum logic [0:0] {
    ROUND_LARGEST_REMAINDER = 1'b0,
    ROUND_HALF_UP           = 1'b1
  } round_mode_e;

endpackage
