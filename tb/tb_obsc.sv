`timescale 1ns / 1ps
// tb_obsc: self-checking test of the observation boundary-scan cell.
//
// It checks normal operation against a standard-cell reference, that the
// ND flip-flop is set by a falling edge and the SD flip-flop by a rising
// edge of the detector outputs only while CE=1, that they hold while
// CE=0, that Capture-DR under SI=1 loads the flip-flop chosen by
// ND/SD-bar into FF1 (sel=0) while Shift-DR still shifts (sel=1), and that
// TRST clears both detector flip-flops.
module tb_obsc;
  import si_jtag_pkg::*;

  logic tck = 1'b0, rst = 1'b1, trst_n = 1'b1;
  bsc_ctrl_t ctrl = '0;
  logic pin_in = 1'b0, nd_c = 1'b1, sd_c = 1'b0, si_in = 1'b0;
  logic so, core_in, nd_flag, sd_flag;
  int checks = 0, failures = 0;

  obsc dut (.tck, .rst, .trst_n, .ctrl, .pin_in, .nd_c, .sd_c, .si_in, .so,
            .core_in, .nd_flag, .sd_flag);

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

  task automatic clear();
    #1 trst_n = 1'b0;
    #1 trst_n = 1'b1;
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
    clear();
    @(negedge tck) rst = 1'b0;
    check(!nd_flag && !sd_flag, "TRST clears the detector flip-flops");
    // ---- normal mode (SI=0), random ----
    r1 = 0; r2 = 0;
    for (int i = 0; i < 200; i++) begin
      logic cd, sh, up, md;
      @(negedge tck);
      cd = 1'($urandom); sh = 1'($urandom); up = 1'($urandom); md = 1'($urandom);
      ctrl = '0;
      ctrl.clock_dr = cd; ctrl.shift_dr = sh; ctrl.update_dr = up; ctrl.mode = md;
      ctrl.nd_sdn = 1'($urandom);
      pin_in = 1'($urandom); si_in = 1'($urandom);
      #1;
      check(core_in == (md ? r2 : pin_in), $sformatf("Mode mux %0d", i));
      @(posedge tck); #1;
      if (up) r2 = r1;
      if (cd) r1 = sh ? si_in : pin_in;
      check(so == r1 && dut.q2 == r2, $sformatf("normal mode step %0d", i));
    end
    ctrl = '0;
    // ---- detectors disabled: no effect ----
    #3 nd_c = 1'b0; #3 nd_c = 1'b1;
    #3 sd_c = 1'b1; #3 sd_c = 1'b0;
    check(!nd_flag && !sd_flag, "CE=0 ignores detector pulses");
    // ---- enabled: ND only ----
    ctrl.ce = 1'b1;
    #3 nd_c = 1'b0; #3 nd_c = 1'b1;
    check(nd_flag && !sd_flag, "ND falling edge sets the ND flip-flop only");
    #3 sd_c = 1'b1; #3 sd_c = 1'b0;
    check(nd_flag && sd_flag, "SD pulse sets the SD flip-flop");
    ctrl.ce = 1'b0;
    // ---- read-out under SI=1 ----
    for (int pass = 0; pass < 4; pass++) begin
      logic nd_v, sd_v;
      nd_v = 1'(pass[0]); sd_v = 1'(pass[1]);
      clear();
      ctrl.ce = 1'b1;
      if (nd_v) begin #3 nd_c = 1'b0; #3 nd_c = 1'b1; end
      if (sd_v) begin #3 sd_c = 1'b1; #3 sd_c = 1'b0; end
      ctrl.ce = 1'b0;
      ctrl.si = 1'b1;
      pin_in = ~(nd_v ^ sd_v);       // a value different from what must be read
      for (int sel_nd = 0; sel_nd < 2; sel_nd++) begin
        ctrl.nd_sdn = 1'(sel_nd);
        cyc(1, 0, 0);                 // Capture-DR, sel = 0
        check(so == (sel_nd ? nd_v : sd_v),
              $sformatf("capture of %s FF, pass %0d", sel_nd ? "ND" : "SD", pass));
        si_in = ~so;
        cyc(1, 1, 0);                 // Shift-DR, sel = 1
        check(so == si_in, "Shift-DR under SI=1 shifts the serial input");
      end
      check(nd_flag == nd_v && sd_flag == sd_v, "read-out keeps the detector flip-flops");
      ctrl.si = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
