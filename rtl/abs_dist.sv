// abs_dist: distance between a sample and a centroid, |a - b|.
//
// For scalar (one-dimensional) samples the Euclidean distance reduces to the
// absolute difference; the square root is left out because only the order of
// two distances is ever used. A greater-than comparator decides which operand
// is the larger, and the smaller is subtracted from it, so the result never
// needs a sign bit and has the same width W as the operands.
//
// Interface: a, b unsigned W-bit operands; distance the unsigned W-bit distance.
// Timing: purely combinational, no clock.
//
// The distance measure follows the Euclidean distance the design uses;
// unsigned operands and the compare-then-subtract structure are this design's
// choices.
module abs_dist
  import kmeans_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] distance
);

  logic a_gt_b;

  always_comb begin
    a_gt_b = (a > b);
    distance   = a_gt_b ? (a - b) : (b - a);
  end

endmodule
