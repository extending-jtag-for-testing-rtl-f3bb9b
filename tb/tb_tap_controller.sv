`timescale 1ns / 1ps
// tb_tap_controller: self-checking test of the IEEE 1149.1 TAP state
// machine.
//
// It applies a long random TMS sequence and compares every state with a
// transition table written here from the standard's state diagram. It also
// checks that five TCK cycles with TMS high reach Test-Logic-Reset from
// any state, that TRST forces it asynchronously, and that the reset flag
// is 1 exactly while the controller is in Test-Logic-Reset.
module tb_tap_controller;
  import si_jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1, tms = 1'b1;
  tap_state_e state;
  logic reset;
  int checks = 0, failures = 0;

  tap_controller dut (.tck, .trst_n, .tms, .state_o (state), .reset_o (reset));

  always #5 tck = ~tck;

  // next state for TMS = 0 and TMS = 1, indexed by the state code
  function automatic tap_state_e ref_next(input tap_state_e s, input logic t);
    tap_state_e n0 [16] = '{TAP_IDLE, TAP_IDLE, TAP_CAPTURE_DR, TAP_SHIFT_DR, TAP_SHIFT_DR,
                            TAP_PAUSE_DR, TAP_PAUSE_DR, TAP_SHIFT_DR, TAP_IDLE,
                            TAP_CAPTURE_IR, TAP_SHIFT_IR, TAP_SHIFT_IR, TAP_PAUSE_IR,
                            TAP_PAUSE_IR, TAP_SHIFT_IR, TAP_IDLE};
    tap_state_e n1 [16] = '{TAP_RESET, TAP_SEL_DR, TAP_SEL_IR, TAP_EXIT1_DR, TAP_EXIT1_DR,
                            TAP_UPDATE_DR, TAP_EXIT2_DR, TAP_UPDATE_DR, TAP_SEL_DR,
                            TAP_RESET, TAP_EXIT1_IR, TAP_EXIT1_IR, TAP_UPDATE_IR,
                            TAP_EXIT2_IR, TAP_UPDATE_IR, TAP_SEL_DR};
    return t ? n1[s] : n0[s];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tap_state_e exp;
    #2 trst_n = 1'b0;
    #1;
    check(state == TAP_RESET && reset, "TRST forces Test-Logic-Reset");
    @(negedge tck) trst_n = 1'b1;
    exp = TAP_RESET;
    for (int i = 0; i < 2000; i++) begin
      @(negedge tck);
      tms = ($urandom_range(0, 2) == 0);
      @(posedge tck); #1;
      exp = ref_next(exp, tms);
      check(state == exp, $sformatf("step %0d: state %0d expected %0d", i, state, exp));
      check(reset == (exp == TAP_RESET), $sformatf("reset flag at step %0d", i));
      if (i % 100 == 50) begin
        repeat (5) begin @(negedge tck); tms = 1'b1; end
        @(posedge tck); #1;
        check(state == TAP_RESET, "five TMS=1 cycles reach Test-Logic-Reset");
        exp = TAP_RESET;
      end
    end
    @(negedge tck); tms = 1'b0;
    @(posedge tck); #1;
    @(negedge tck) trst_n = 1'b0;
    #1;
    check(state == TAP_RESET, "asynchronous TRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
