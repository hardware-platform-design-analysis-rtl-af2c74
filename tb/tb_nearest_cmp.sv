// tb_nearest_cmp: exhaustive self-check of nearest_cmp at W = 8.
//
// Every pair of distances is applied. Expected: cluster 2 only when its
// distance is strictly smaller, cluster 1 otherwise (ties included), and the
// tie flag exactly when the distances are equal. Combinational: checked 1
// time unit after each input change. A watchdog bounds the run.
`timescale 1ns/1ps
module tb_nearest_cmp;
  import kmeans_pkg::*;
  localparam int unsigned W = 8;

  logic [W-1:0] dist1, dist2;
  cluster_e sel;
  logic tie;
  int checks = 0;
  int failures = 0;
  int ties_seen = 0;

  nearest_cmp #(.W(W)) dut (.dist1(dist1), .dist2(dist2), .sel(sel), .tie(tie));

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cluster_e exp_sel;
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        dist1 = W'(i);
        dist2 = W'(j);
        #1;
        exp_sel = (j < i) ? CLUSTER2 : CLUSTER1;
        checks++;
        if (sel != exp_sel) begin
          failures++;
          if (failures < 10)
            $display("FAIL d1=%0d d2=%0d sel=%0d expected %0d", i, j, sel, exp_sel);
        end
        checks++;
        if (tie != (i == j)) begin
          failures++;
          if (failures < 10) $display("FAIL d1=%0d d2=%0d tie=%0b", i, j, tie);
        end
        if (tie) ties_seen++;
      end
    end
    checks++;
    if (ties_seen != (1 << W)) begin
      failures++;
      $display("FAIL tie seen %0d times, expected %0d", ties_seen, 1 << W);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
