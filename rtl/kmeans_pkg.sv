// kmeans_pkg: types shared by the K-Means assignment datapath.
//
// The design classifies one scalar sample into one of two clusters (K = 2).
// cluster_e names the two clusters; it is the select signal that runs from
// the nearest-centroid comparator to the output multiplexer. The encoding
// (cluster 1 = 0, cluster 2 = 1) is this design's own choice.
package kmeans_pkg;

  // Default sample / centroid width in bits.
  localparam int unsigned DATA_W = 8;

  typedef enum logic {
    CLUSTER1 = 1'b0,
    CLUSTER2 = 1'b1
  } cluster_e;

endpackage
