`timescale 1ns / 1ps
// tap_controller: the IEEE 1149.1 test access port state machine.
//
// The sixteen-state controller advances on each rising edge of TCK under
// TMS and is forced to Test-Logic-Reset by TRST (active low, asynchronous)
// or by five TCK cycles with TMS high. The signal-integrity extension
// leaves the controller itself unchanged: the new instructions only change
// how the states are decoded (see ir_decoder).
//
// Outputs: the current state, and `reset_o`, a registered flag that is 1
// while the controller is in Test-Logic-Reset; it clears the instruction
// register and the detector flip-flops without glitches.
module tap_controller
  import si_jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state_o,
  output logic       reset_o
);

  tap_state_e state_q, state_d;

  always_comb begin
    unique case (state_q)
      TAP_RESET:      state_d = tms ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       state_d = tms ? TAP_SEL_DR    : TAP_IDLE;
      TAP_SEL_DR:     state_d = tms ? TAP_SEL_IR    : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: state_d = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   state_d = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   state_d = tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   state_d = tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   state_d = tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  state_d = tms ? TAP_SEL_DR    : TAP_IDLE;
      TAP_SEL_IR:     state_d = tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: state_d = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   state_d = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   state_d = tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   state_d = tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   state_d = tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  state_d = tms ? TAP_SEL_DR    : TAP_IDLE;
      default:        state_d = TAP_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      state_q <= TAP_RESET;
      reset_o <= 1'b1;
    end else begin
      state_q <= state_d;
      reset_o <= (state_d == TAP_RESET);
    end
  end

  assign state_o = state_q;

endmodule
