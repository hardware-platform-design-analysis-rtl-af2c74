// tb_abs_dist: exhaustive self-check of abs_dist at W = 8.
//
// Every pair (a, b) of 8-bit values is applied; the expected distance is
// computed in integer arithmetic as the larger operand minus the smaller.
// The block is combinational, so each result is checked 1 time unit after
// the inputs change. A watchdog ends the run with a failure if it hangs.
`timescale 1ns/1ps
module tb_abs_dist;
  localparam int unsigned W = 8;

  logic [W-1:0] a, b, distance;
  int checks = 0;
  int failures = 0;

  abs_dist #(.W(W)) dut (.a(a), .b(b), .distance(distance));

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_d;
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        exp_d = (i > j) ? (i - j) : (j - i);
        checks++;
        if (int'(distance) != exp_d) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d distance=%0d expected %0d", i, j, distance, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
