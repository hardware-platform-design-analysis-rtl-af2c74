// kmeans_top: K-Means assignment step for two clusters of 8-bit samples.
//
// One sample and two centroids come in; the sample comes out on the port of
// the cluster whose centroid is nearest, and the other cluster port reads
// zero. Two abs_dist units form |data - centroid1| and |data - centroid2|,
// nearest_cmp compares the two distances (a tie goes to cluster 1), and
// cluster_mux steers the sample. The centroid update and the repeat-until-
// stable loop of K-Means are left to whatever drives this block: it performs
// the assignment of one sample per evaluation.
//
// An immediate assertion checks the tie rule in simulation.
//
// Interface: centroid1, centroid2, data in; cluster1, cluster2 out, all W
// bits wide (five 8-bit ports at the default). There is no clock and no reset.
// Timing: purely combinational; outputs follow the inputs within one
// combinational path (centroid -> subtract -> compare -> mux).
//
// K = 2, 8-bit ports, a comparator-and-multiplexer datapath and zero on the
// unused output follow the design; the tie rule and unsigned samples are this
// design's own choices.
module kmeans_top
  import kmeans_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] centroid1,
  input  logic [W-1:0] centroid2,
  input  logic [W-1:0] data,
  output logic [W-1:0] cluster1,
  output logic [W-1:0] cluster2
);

  logic [W-1:0] dist1;
  logic [W-1:0] dist2;
  cluster_e     sel;
  logic         tie;  // not a port: used only by the tie-rule assertion

  abs_dist #(.W(W)) u_dist1 (
    .a    (data),
    .b    (centroid1),
    .distance (dist1)
  );

  abs_dist #(.W(W)) u_dist2 (
    .a    (data),
    .b    (centroid2),
    .distance (dist2)
  );

  nearest_cmp #(.W(W)) u_cmp (
    .dist1 (dist1),
    .dist2 (dist2),
    .sel   (sel),
    .tie   (tie)
  );

  cluster_mux #(.W(W)) u_mux (
    .data     (data),
    .sel      (sel),
    .cluster1 (cluster1),
    .cluster2 (cluster2)
  );

  // Tie rule: a sample equally far from both centroids belongs to cluster 1.
  always_comb begin
    if (tie) assert (sel == CLUSTER1)
      else $error("tie resolved to cluster 2");
  end

endmodule
