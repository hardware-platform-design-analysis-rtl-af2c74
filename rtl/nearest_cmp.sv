// nearest_cmp: picks the cluster whose centroid is nearest to the sample.
//
// Two comparators look at the two distances: a greater-than comparator and an
// equality comparator. The sample goes to cluster 2 only when its distance to
// centroid 2 is strictly smaller; when the distances are equal it goes to
// cluster 1 (the lower-numbered cluster wins a tie, this design's choice).
//
// Interface: dist1, dist2 unsigned W-bit distances to centroid 1 and 2;
// sel the chosen cluster; tie high when dist1 == dist2.
// Timing: purely combinational, no clock.
module nearest_cmp
  import kmeans_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] dist1,
  input  logic [W-1:0] dist2,
  output cluster_e     sel,
  output logic         tie
);

  logic d1_gt_d2;

  always_comb begin
    d1_gt_d2 = (dist1 > dist2);
    tie      = (dist1 == dist2);
    sel      = d1_gt_d2 ? CLUSTER2 : CLUSTER1;
  end

endmodule
