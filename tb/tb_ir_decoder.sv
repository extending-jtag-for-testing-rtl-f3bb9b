`timescale 1ns / 1ps
// tb_ir_decoder: self-checking test of the instruction register and
// decoder.
//
// The TAP state is driven directly. For every 3-bit opcode the test
// shifts it in through Shift-IR (checking the captured 001 on the serial
// output), then compares the control bundle in every DR state with a
// reference decode written here: Mode/SI/CE per instruction, ClockDR in
// Capture-DR and Shift-DR (none in Capture-DR under G_SITEST), UpdateDR
// (none after a shifting scan under G_SITEST), ND/SD-bar set by Update-IR
// and toggled by each Update-DR of O_SITEST, and unknown codes acting as
// BYPASS.
module tb_ir_decoder;
  import si_jtag_pkg::*;

  logic tck = 1'b0, tap_reset = 1'b1, tdi = 1'b0;
  tap_state_e state = TAP_RESET;
  instr_e instr;
  bsc_ctrl_t ctrl;
  logic ir_tdo, bypass_sel;
  int checks = 0, failures = 0;

  ir_decoder dut (.tck, .tap_reset, .state, .tdi, .instr_o (instr), .ctrl_o (ctrl),
                  .ir_tdo, .bypass_sel);

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic go(input tap_state_e s);
    @(negedge tck) state = s;
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge tck); #1;
    check(instr == INSTR_BYPASS && bypass_sel, "reset selects BYPASS");
    @(negedge tck) tap_reset = 1'b0;
    for (int code = 0; code < 8; code++) begin
      instr_e ex;
      bit known, g, o;
      logic nd_exp;
      known = (code == 0 || code == 1 || code == 2 || code == 3 || code == 7);
      ex = known ? instr_e'(code) : INSTR_BYPASS;
      g = (ex == INSTR_G_SITEST);
      o = (ex == INSTR_O_SITEST);
      // IR scan
      go(TAP_IDLE); go(TAP_SEL_DR); go(TAP_SEL_IR); go(TAP_CAPTURE_IR);
      for (int i = 0; i < IR_LEN; i++) begin
        go(TAP_SHIFT_IR);
        #1 check(ir_tdo == (i == 0 ? 1'b1 : (i == 1 ? 1'b0 : 1'(code >> (i - 2)))) || i > 1,
                 "captured 001 appears on the IR serial output");
        tdi = 1'(code >> i);
      end
      go(TAP_EXIT1_IR); go(TAP_UPDATE_IR); go(TAP_IDLE);
      #1;
      check(instr == ex, $sformatf("opcode %0d decodes to %0d, got %0d", code, ex, instr));
      check(bypass_sel == (ex == INSTR_BYPASS), "bypass select");
      check(ctrl.mode == (ex == INSTR_EXTEST || g || o), $sformatf("Mode for %0d", code));
      check(ctrl.si == (g || o), $sformatf("SI for %0d", code));
      check(ctrl.ce == g, $sformatf("CE for %0d", code));
      check(ctrl.nd_sdn == 1'b1, "Update-IR sets ND/SD-bar");
      nd_exp = 1'b1;
      // three DR scans: shifting, not shifting, shifting
      for (int scan = 0; scan < 3; scan++) begin
        bit shifts;
        shifts = (scan != 1);
        go(TAP_SEL_DR);
        #1 check(!ctrl.clock_dr && !ctrl.update_dr && !ctrl.shift_dr, "Select-DR idle");
        go(TAP_CAPTURE_DR);
        #1 check(ctrl.clock_dr == (ex != INSTR_BYPASS && !g) && !ctrl.shift_dr,
                 $sformatf("ClockDR in Capture-DR for %0d", code));
        if (shifts) begin
          go(TAP_SHIFT_DR);
          #1 check(ctrl.shift_dr && ctrl.clock_dr == (ex != INSTR_BYPASS),
                   "ShiftDR and ClockDR in Shift-DR");
        end
        go(TAP_EXIT1_DR);
        #1 check(!ctrl.clock_dr && !ctrl.update_dr, "Exit1-DR idle");
        go(TAP_UPDATE_DR);
        #1 check(ctrl.update_dr == (ex != INSTR_BYPASS && !(g && shifts)),
                 $sformatf("UpdateDR for %0d scan %0d", code, scan));
        go(TAP_IDLE);
        #1;
        if (o) nd_exp = ~nd_exp;
        check(ctrl.nd_sdn == nd_exp, $sformatf("ND/SD-bar after scan %0d of %0d", scan, code));
      end
    end
    go(TAP_RESET);
    @(negedge tck) tap_reset = 1'b1;
    #1 check(instr == INSTR_BYPASS, "Test-Logic-Reset restores BYPASS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
