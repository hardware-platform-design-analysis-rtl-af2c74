// tb_cluster_mux: exhaustive self-check of cluster_mux at W = 8.
//
// Every sample value is applied with each select. Expected: the selected
// cluster output equals the sample and the other output is zero. Between
// samples the select is toggled so that a stale value held by a latch-like
// implementation would show. Combinational: checked 1 time unit after each
// input change. A watchdog bounds the run.
`timescale 1ns/1ps
module tb_cluster_mux;
  import kmeans_pkg::*;
  localparam int unsigned W = 8;

  logic [W-1:0] data, cluster1, cluster2;
  cluster_e sel;
  int checks = 0;
  int failures = 0;

  cluster_mux #(.W(W)) dut (.data(data), .sel(sel), .cluster1(cluster1), .cluster2(cluster2));

  task automatic check(input int d, input cluster_e s);
    logic [W-1:0] e1, e2;
    data = W'(d);
    sel  = s;
    #1;
    e1 = (s == CLUSTER1) ? W'(d) : '0;
    e2 = (s == CLUSTER2) ? W'(d) : '0;
    checks++;
    if (cluster1 !== e1 || cluster2 !== e2) begin
      failures++;
      if (failures < 10)
        $display("FAIL data=%0d sel=%0d c1=%0d c2=%0d expected %0d %0d",
                 d, s, cluster1, cluster2, e1, e2);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      check(i, CLUSTER1);
      check(i, CLUSTER2);
      check((1 << W) - 1 - i, CLUSTER1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
