`timescale 1ns / 1ps
// ir_decoder: instruction register and instruction decoder of the
// extended TAP, including the two signal-integrity instructions.
//
// The instruction register captures 001 in Capture-IR, shifts LSB first
// from TDI in Shift-IR and loads the new instruction at the end of
// Update-IR. Unknown opcodes act as BYPASS. From the current instruction
// and TAP state the decoder drives the boundary-cell control bundle:
//   EXTEST          Mode=1
//   SAMPLE/PRELOAD  Mode=0 (used to load the initial pattern into FF2)
//   G_SITEST        Mode=1, SI=1, CE=1 (PGBSCs generate patterns, ND/SD
//                   cells record violations)
//   O_SITEST        Mode=1, SI=1, CE=0 (ND/SD flip-flops are read out)
//   BYPASS          boundary register idle, one-bit bypass selected
// ND/SD-bar is set to 1 at every Update-IR, so the first O_SITEST read-out
// returns the ND flip-flops, and is complemented at every Update-DR of
// O_SITEST so the next read-out returns the SD flip-flops. That behaviour
// and the SI/CE values are the design's; the rest is this implementation's:
//  * ClockDR is suppressed in Capture-DR under G_SITEST, so the
//    victim-select bits held in the PGBSC FF1s survive the Capture-DR
//    state that every pattern-applying Update-DR must pass through.
//  * Under G_SITEST an Update-DR that ends a scan in which Shift-DR was
//    visited (the victim-select shift) is not passed on; only a scan
//    Capture-DR -> Exit1-DR -> Update-DR applies a pattern. Thus every
//    victim receives exactly three patterns.
//  * The control signals are decoded from the registered TAP state, and
//    every enable acts on the TCK rising edge that leaves the state.
// Three assertions state the rules of the bundle: no capture/shift and
// update on the same edge, ShiftDR only with ClockDR (or bypass), and CE
// only in SI mode. SYNCASYNCNET from lint stands: tap_reset is the
// asynchronous reset and also the assertions' disable condition.
module ir_decoder
  import si_jtag_pkg::*;
(
  input  logic       tck,
  input  logic       tap_reset,   // 1 in Test-Logic-Reset (asynchronous)
  input  tap_state_e state,
  input  logic       tdi,
  output instr_e     instr_o,
  output bsc_ctrl_t  ctrl_o,
  output logic       ir_tdo,      // serial output of the IR shift stage
  output logic       bypass_sel   // 1: the bypass register is the DR
);

  logic [IR_LEN-1:0] ir_sr;
  instr_e            instr_q;
  logic              nd_sdn_q;
  logic              shifted_q;   // Shift-DR visited in this DR scan

  function automatic instr_e decode(input logic [IR_LEN-1:0] code);
    unique case (code)
      INSTR_EXTEST:         return INSTR_EXTEST;
      INSTR_SAMPLE_PRELOAD: return INSTR_SAMPLE_PRELOAD;
      INSTR_G_SITEST:       return INSTR_G_SITEST;
      INSTR_O_SITEST:       return INSTR_O_SITEST;
      default:              return INSTR_BYPASS;
    endcase
  endfunction

  always_ff @(posedge tck or posedge tap_reset) begin
    if (tap_reset) begin
      ir_sr     <= IR_CAPTURE;
      instr_q   <= INSTR_BYPASS;
      nd_sdn_q  <= 1'b1;
      shifted_q <= 1'b0;
    end else begin
      unique case (state)
        TAP_CAPTURE_IR: ir_sr <= IR_CAPTURE;
        TAP_SHIFT_IR:   ir_sr <= {tdi, ir_sr[IR_LEN-1:1]};
        TAP_UPDATE_IR: begin
          instr_q  <= decode(ir_sr);
          nd_sdn_q <= 1'b1;
        end
        TAP_CAPTURE_DR: shifted_q <= 1'b0;
        TAP_SHIFT_DR:   shifted_q <= 1'b1;
        TAP_UPDATE_DR:  if (instr_q == INSTR_O_SITEST) nd_sdn_q <= ~nd_sdn_q;
        default: ;
      endcase
    end
  end

  logic bsr_sel;
  assign bsr_sel    = (instr_q != INSTR_BYPASS);
  assign bypass_sel = ~bsr_sel;

  always_comb begin
    ctrl_o           = '0;
    ctrl_o.shift_dr  = (state == TAP_SHIFT_DR);
    ctrl_o.clock_dr  = bsr_sel &&
                       ((state == TAP_SHIFT_DR) ||
                        (state == TAP_CAPTURE_DR && instr_q != INSTR_G_SITEST));
    ctrl_o.update_dr = bsr_sel && (state == TAP_UPDATE_DR) &&
                       !(instr_q == INSTR_G_SITEST && shifted_q);
    ctrl_o.mode      = (instr_q == INSTR_EXTEST) || (instr_q == INSTR_G_SITEST) ||
                       (instr_q == INSTR_O_SITEST);
    ctrl_o.si        = (instr_q == INSTR_G_SITEST) || (instr_q == INSTR_O_SITEST);
    ctrl_o.ce        = (instr_q == INSTR_G_SITEST);
    ctrl_o.nd_sdn    = nd_sdn_q;
  end

  // Rules of the cell control bundle: a cell never captures/shifts and
  // updates on the same edge, ShiftDR only comes with ClockDR unless the
  // bypass register is selected, and the detectors are armed only in SI
  // mode.
  a_no_capture_and_update: assert property (@(posedge tck) disable iff (tap_reset)
    !(ctrl_o.clock_dr && ctrl_o.update_dr));
  a_shift_with_clock: assert property (@(posedge tck) disable iff (tap_reset)
    !ctrl_o.shift_dr || ctrl_o.clock_dr || bypass_sel);
  a_ce_only_in_si: assert property (@(posedge tck) disable iff (tap_reset)
    !ctrl_o.ce || ctrl_o.si);

  assign instr_o = instr_q;
  assign ir_tdo  = ir_sr[0];

endmodule
