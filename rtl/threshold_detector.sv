// threshold_detector: scales Z by alpha and decides whether the CUT is a target.
//
// threshold = alpha * Z, where alpha is an unsigned fixed-point number with
// ALPHA_FRAC fraction bits (the default 973 with 10 fraction bits is
// alpha = 0.9501953125). The decision e(y) is 1 when CUT >= alpha * Z, using
// the full-precision product, and 0 otherwise. threshold_int is the product
// without its fraction bits, for observing the adaptive threshold. The
// multiplier and comparator are the reference design's; the fixed-point
// format of alpha and the exact, untruncated comparison are this design's.
// Purely combinational.
module threshold_detector #(
  parameter int unsigned DATA_W     = 12,
  parameter int unsigned ALPHA_W    = 16,
  parameter int unsigned ALPHA_FRAC = 10,
  parameter int unsigned PROD_W     = DATA_W + ALPHA_W
) (
  input  logic [DATA_W-1:0]            z,
  input  logic [ALPHA_W-1:0]           alpha,
  input  logic [DATA_W-1:0]            cut,
  output logic [PROD_W-1:0]            threshold,
  output logic [PROD_W-ALPHA_FRAC-1:0] threshold_int,
  output logic                         detect
);

  logic [PROD_W-1:0] cut_scaled;

  always_comb begin
    threshold     = PROD_W'(z) * PROD_W'(alpha);
    threshold_int = threshold[PROD_W-1:ALPHA_FRAC];
    cut_scaled    = PROD_W'(cut) << ALPHA_FRAC;
    detect        = cut_scaled >= threshold;
  end

endmodule
