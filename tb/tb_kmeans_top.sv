// tb_kmeans_top: end-to-end check of kmeans_top at its default parameters.
//
// Part 1 applies every combination of centroid1, centroid2 and data (2^24
// cases at 8 bits) and compares both cluster outputs with a reference model
// written here: distances |data - centroid| in integer arithmetic, the nearer
// centroid wins, a tie goes to cluster 1, the other output is zero. It counts
// how often each outcome occurred (cluster 1 by distance, cluster 2, tie) and
// fails if any never did.
//
// Part 2 runs the whole K-Means loop around the block: a data set of two
// groups is drawn with $urandom, the first two samples become the centroids,
// each sample is assigned by the block, the testbench updates each centroid
// to the mean of its members, and this repeats until no assignment changes.
// The assignment read from the block is compared with the reference model in
// every pass, and the loop must converge within a bounded number of passes.
//
// The block is combinational: each result is checked 1 ns after its inputs
// change, i.e. within one period of the 20 ns stimulus clock. A watchdog
// ends the run with a failure if it hangs.
`timescale 1ns/1ps
module tb_kmeans_top;
  localparam int unsigned W = 8;
  localparam int unsigned N_SAMPLES = 64;
  localparam int unsigned MAX_PASSES = 32;

  logic [W-1:0] centroid1, centroid2, data, cluster1, cluster2;
  int checks = 0;
  int failures = 0;
  int n_c1 = 0, n_c2 = 0, n_tie = 0, n_converged = 0;

  kmeans_top dut (
    .centroid1 (centroid1),
    .centroid2 (centroid2),
    .data      (data),
    .cluster1  (cluster1),
    .cluster2  (cluster2)
  );

  // Reference model: 1 = cluster 1, 2 = cluster 2.
  function automatic int ref_cluster(input int c1, input int c2, input int d);
    int d1, d2;
    d1 = (d > c1) ? d - c1 : c1 - d;
    d2 = (d > c2) ? d - c2 : c2 - d;
    return (d2 < d1) ? 2 : 1;
  endfunction

  task automatic apply_check(input int c1, input int c2, input int d, output int got);
    int exp_k;
    logic [W-1:0] e1, e2;
    centroid1 = W'(c1);
    centroid2 = W'(c2);
    data      = W'(d);
    #1;
    exp_k = ref_cluster(c1, c2, d);
    e1 = (exp_k == 1) ? W'(d) : '0;
    e2 = (exp_k == 2) ? W'(d) : '0;
    checks++;
    if (cluster1 != e1 || cluster2 != e2) begin
      failures++;
      if (failures < 10)
        $display("FAIL c1=%0d c2=%0d d=%0d out=%0d/%0d expected %0d/%0d",
                 c1, c2, d, cluster1, cluster2, e1, e2);
    end
    // Which port carried the sample (a zero sample is read from the model).
    if (d == 0)              got = exp_k;
    else if (cluster2 == W'(d)) got = 2;
    else                     got = 1;
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    int samples [N_SAMPLES];
    int member  [N_SAMPLES];
    int c1, c2, passes, changed, sum1, sum2, cnt1, cnt2;

    // Part 1: exhaustive.
    for (int a = 0; a < (1 << W); a++) begin
      for (int b = 0; b < (1 << W); b++) begin
        for (int d = 0; d < (1 << W); d++) begin
          int da, db;
          apply_check(a, b, d, got);
          da = (d > a) ? d - a : a - d;
          db = (d > b) ? d - b : b - d;
          if (da == db) n_tie++;
          else if (da < db) n_c1++;
          else n_c2++;
        end
      end
    end

    // Part 2: K-Means iterations with the block doing the assignment step.
    for (int trial = 0; trial < 8; trial++) begin
      for (int i = 0; i < N_SAMPLES; i++) begin
        if (i % 2 == 0) samples[i] = 20 + int'($urandom_range(0, 60));
        else            samples[i] = 170 + int'($urandom_range(0, 60));
        member[i] = 0;
      end
      c1 = samples[0];
      c2 = samples[1];
      passes = 0;
      do begin
        changed = 0;
        sum1 = 0; sum2 = 0; cnt1 = 0; cnt2 = 0;
        for (int i = 0; i < N_SAMPLES; i++) begin
          apply_check(c1, c2, samples[i], got);
          if (got != member[i]) changed++;
          member[i] = got;
          if (got == 1) begin sum1 += samples[i]; cnt1++; end
          else          begin sum2 += samples[i]; cnt2++; end
        end
        if (cnt1 > 0) c1 = sum1 / cnt1;
        if (cnt2 > 0) c2 = sum2 / cnt2;
        passes++;
      end while (changed != 0 && passes < MAX_PASSES);
      checks++;
      if (changed != 0) begin
        failures++;
        $display("FAIL trial %0d did not converge in %0d passes", trial, passes);
      end else begin
        n_converged++;
      end
      // The two well-separated groups must end in different clusters.
      checks++;
      for (int i = 0; i < N_SAMPLES; i++) begin
        if (member[i] != member[i % 2]) begin
          failures++;
          $display("FAIL trial %0d sample %0d in wrong cluster", trial, i);
          break;
        end
      end
    end

    $display("outcomes: cluster1=%0d cluster2=%0d tie=%0d converged_runs=%0d",
             n_c1, n_c2, n_tie, n_converged);
    checks++; if (n_c1 == 0) begin failures++; $display("FAIL cluster 1 never chosen"); end
    checks++; if (n_c2 == 0) begin failures++; $display("FAIL cluster 2 never chosen"); end
    checks++; if (n_tie == 0) begin failures++; $display("FAIL no tie seen"); end
    checks++; if (n_converged == 0) begin failures++; $display("FAIL no run converged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
