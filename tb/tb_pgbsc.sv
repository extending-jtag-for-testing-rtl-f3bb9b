`timescale 1ns / 1ps
// tb_pgbsc: self-checking test of the pattern generation boundary-scan
// cell.
//
// It drives the control bundle directly. In normal mode (SI=0) the cell
// is checked against a standard-cell reference with random controls. In
// signal-integrity mode it loads an initial value through FF2, puts a
// victim-select bit into FF1 and applies three UpdateDRs: an aggressor cell
// (FF1=0) must toggle its pin on each, a victim cell (FF1=1) only on the
// second, so the pin follows the maximum-aggressor sequence. Reloading FF1
// between victims restarts the divide-by-two, and the pin must follow FF2
// only with Mode=1.
module tb_pgbsc;
  import si_jtag_pkg::*;

  logic tck = 1'b0, rst = 1'b1;
  bsc_ctrl_t ctrl = '0;
  logic core_out = 1'b0, si_in = 1'b0;
  logic so, pin;
  int checks = 0, failures = 0;

  pgbsc dut (.tck, .rst, .ctrl, .core_out, .si_in, .so, .pin);

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc(input bit cd, input bit sh, input bit up);
    @(negedge tck);
    ctrl.clock_dr = cd; ctrl.shift_dr = sh; ctrl.update_dr = up;
    @(posedge tck); #1;
    ctrl.clock_dr = 0; ctrl.shift_dr = 0; ctrl.update_dr = 0;
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic r1, r2;
    @(negedge tck) rst = 1'b0;
    // ---- normal mode, random ----
    r1 = 0; r2 = 0;
    for (int i = 0; i < 200; i++) begin
      logic cd, sh, up, md;
      @(negedge tck);
      cd = 1'($urandom); sh = 1'($urandom); up = 1'($urandom); md = 1'($urandom);
      ctrl = '0;
      ctrl.clock_dr = cd; ctrl.shift_dr = sh; ctrl.update_dr = up; ctrl.mode = md;
      core_out = 1'($urandom); si_in = 1'($urandom);
      #1;
      check(pin == (md ? r2 : core_out), $sformatf("normal Mode mux %0d", i));
      @(posedge tck); #1;
      if (up) r2 = r1;
      if (cd) r1 = sh ? si_in : core_out;
      check(so == r1 && dut.q2 == r2, $sformatf("normal mode step %0d", i));
    end
    // ---- signal-integrity mode ----
    for (int trial = 0; trial < 16; trial++) begin
      logic init, role, exp;
      init = 1'(trial[0]);
      role = 1'(trial[1]);          // 1 = victim
      ctrl = '0;
      // preload the initial value into FF2 (SI=0)
      si_in = init; cyc(1, 1, 0); cyc(0, 0, 1);
      ctrl.mode = 1'b1;
      #1 check(pin == init, "initial value on the pin");
      ctrl.si = 1'b1;
      // shift the victim-select bit into FF1 (no update)
      si_in = role; cyc(1, 1, 0);
      check(so == role, "victim-select bit in FF1");
      check(pin == init, "victim-select shift leaves the pin");
      exp = init;
      for (int u = 1; u <= 3; u++) begin
        cyc(0, 0, 1);
        if (!role || u == 2) exp = ~exp;
        check(pin == exp, $sformatf("trial %0d %s pattern %0d", trial,
                                    role ? "victim" : "aggressor", u));
      end
      // a second victim period after re-selecting: starts again
      si_in = role; cyc(1, 1, 0);
      for (int u = 1; u <= 3; u++) begin
        cyc(0, 0, 1);
        if (!role || u == 2) exp = ~exp;
        check(pin == exp, $sformatf("trial %0d second period pattern %0d", trial, u));
      end
      check(exp == init, "two periods return the line to its initial value");
      ctrl.mode = 1'b0;
      core_out = ~init;
      #1 check(pin == core_out, "Mode=0 passes the core output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
