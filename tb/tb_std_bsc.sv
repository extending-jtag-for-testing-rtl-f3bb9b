`timescale 1ns / 1ps
// tb_std_bsc: self-checking test of the standard boundary-scan cell.
//
// It drives the control bundle directly, one TCK cycle per operation, and
// checks capture (FF1 <- parallel input), shift (FF1 <- serial input),
// update (FF2 <- FF1, seen on the output in test mode), the Mode mux in
// both positions, hold when no enable is active, and reset. Expected
// values come from a two-register reference kept in the testbench.
module tb_std_bsc;
  import si_jtag_pkg::*;

  logic tck = 1'b0, rst = 1'b1;
  bsc_ctrl_t ctrl = '0;
  logic pi = 1'b0, si_in = 1'b0;
  logic so, po;
  int checks = 0, failures = 0;

  std_bsc dut (.tck, .rst, .ctrl, .pi, .si_in, .so, .po);

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge tck);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic r1, r2;
    @(negedge tck); rst = 1'b1;
    @(negedge tck); rst = 1'b0;
    r1 = 0; r2 = 0;
    check(so == 1'b0, "FF1 reset");
    for (int i = 0; i < 200; i++) begin
      logic cd, sh, up, md;
      @(negedge tck);
      cd = 1'($urandom); sh = 1'($urandom); up = 1'($urandom); md = 1'($urandom);
      ctrl = '0;
      ctrl.clock_dr = cd; ctrl.shift_dr = sh; ctrl.update_dr = up; ctrl.mode = md;
      pi = 1'($urandom); si_in = 1'($urandom);
      #1;
      check(po == (md ? r2 : pi), $sformatf("Mode mux, step %0d", i));
      @(posedge tck); #1;
      if (up) r2 = r1;
      if (cd) r1 = sh ? si_in : pi;
      check(so == r1, $sformatf("FF1 step %0d", i));
      check(dut.q2 == r2, $sformatf("FF2 step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
