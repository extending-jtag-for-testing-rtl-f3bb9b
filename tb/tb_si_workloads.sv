`timescale 1ns / 1ps
// tb_si_workloads: the test-time evaluation of the architecture, for
// 8, 16 and 32 interconnects with no standard cells, read out once at the
// end (method 1), after each initial value (method 2) and after every
// pattern step (method 3).
//
// Each of the nine runs is a si_workload_run instance running the complete
// pattern-generation procedure and read-out with a noisy and a slow line.
// The testbench prints, per run, the TCK cycles of pattern generation and
// the shift cycles of the read-out, and sums the checks of all runs.
module tb_si_workloads;
  localparam int RUNS = 9;
  logic            done   [RUNS];
  int              chk    [RUNS];
  int              fail   [RUNS];
  longint unsigned gen    [RUNS];
  longint unsigned rd     [RUNS];
  int checks = 0, failures = 0;

  si_workload_run #(.N (8),  .METHOD (1)) r0 (done[0], chk[0], fail[0], gen[0], rd[0]);
  si_workload_run #(.N (16), .METHOD (1)) r1 (done[1], chk[1], fail[1], gen[1], rd[1]);
  si_workload_run #(.N (32), .METHOD (1)) r2 (done[2], chk[2], fail[2], gen[2], rd[2]);
  si_workload_run #(.N (8),  .METHOD (2)) r3 (done[3], chk[3], fail[3], gen[3], rd[3]);
  si_workload_run #(.N (16), .METHOD (2)) r4 (done[4], chk[4], fail[4], gen[4], rd[4]);
  si_workload_run #(.N (32), .METHOD (2)) r5 (done[5], chk[5], fail[5], gen[5], rd[5]);
  si_workload_run #(.N (8),  .METHOD (3)) r6 (done[6], chk[6], fail[6], gen[6], rd[6]);
  si_workload_run #(.N (16), .METHOD (3)) r7 (done[7], chk[7], fail[7], gen[7], rd[7]);
  si_workload_run #(.N (32), .METHOD (3)) r8 (done[8], chk[8], fail[8], gen[8], rd[8]);

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ns [RUNS] = '{8, 16, 32, 8, 16, 32, 8, 16, 32};
    #1ns;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] &&
          done[6] && done[7] && done[8]);
    for (int r = 0; r < RUNS; r++) begin
      checks   += chk[r];
      failures += fail[r];
      $display("n=%0d method %0d: pattern generation %0d TCK, read-out %0d shift cycles",
               ns[r], r / 3 + 1, gen[r], rd[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
