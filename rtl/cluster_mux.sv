// cluster_mux: places the sample on the output port of its cluster.
//
// Both cluster outputs start at zero in every evaluation and only the one
// named by sel takes the sample, so the output that does not receive the
// sample reads 8'h00 and no latch can be inferred. Zero as the value of the
// idle output follows the design; there is no separate valid flag, so a sample
// of value zero cannot be told apart from an idle output.
//
// Interface: data the W-bit sample; sel the cluster chosen by nearest_cmp;
// cluster1 / cluster2 the sample or zero.
// Timing: purely combinational, no clock.
module cluster_mux
  import kmeans_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] data,
  input  cluster_e     sel,
  output logic [W-1:0] cluster1,
  output logic [W-1:0] cluster2
);

  always_comb begin
    cluster1 = '0;
    cluster2 = '0;
    unique case (sel)
      CLUSTER1: cluster1 = data;
      CLUSTER2: cluster2 = data;
    endcase
  end

endmodule
