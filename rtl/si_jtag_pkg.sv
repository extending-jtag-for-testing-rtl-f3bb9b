`timescale 1ns / 1ps
// si_jtag_pkg: types and constants shared by the signal-integrity JTAG
// blocks.
//
// It holds the sixteen IEEE 1149.1 TAP controller states, the instruction
// codes of the extended instruction set, and the control bundle that the
// instruction decoder sends to every boundary-scan cell.
//
// The two new instructions G_SITEST (pattern generation) and O_SITEST
// (observation read-out) follow the design; their opcodes, the 3-bit
// instruction length and the state encoding are this implementation's
// choices.
package si_jtag_pkg;

  typedef enum logic [3:0] {
    TAP_RESET     = 4'h0,   // Test-Logic-Reset
    TAP_IDLE      = 4'h1,   // Run-Test/Idle
    TAP_SEL_DR    = 4'h2,
    TAP_CAPTURE_DR= 4'h3,
    TAP_SHIFT_DR  = 4'h4,
    TAP_EXIT1_DR  = 4'h5,
    TAP_PAUSE_DR  = 4'h6,
    TAP_EXIT2_DR  = 4'h7,
    TAP_UPDATE_DR = 4'h8,
    TAP_SEL_IR    = 4'h9,
    TAP_CAPTURE_IR= 4'hA,
    TAP_SHIFT_IR  = 4'hB,
    TAP_EXIT1_IR  = 4'hC,
    TAP_PAUSE_IR  = 4'hD,
    TAP_EXIT2_IR  = 4'hE,
    TAP_UPDATE_IR = 4'hF
  } tap_state_e;

  localparam int unsigned IR_LEN = 3;

  typedef enum logic [IR_LEN-1:0] {
    INSTR_EXTEST         = 3'b000,
    INSTR_SAMPLE_PRELOAD = 3'b001,
    INSTR_G_SITEST       = 3'b010,  // generate MA patterns in the PGBSCs
    INSTR_O_SITEST       = 3'b011,  // read the ND/SD flip-flops of the OBSCs
    INSTR_BYPASS         = 3'b111
  } instr_e;

  // IEEE 1149.1 requires the two least significant bits captured into the
  // instruction register to be 01.
  localparam logic [IR_LEN-1:0] IR_CAPTURE = 3'b001;

  // Control bundle for the boundary-scan cells. All cell flip-flops are
  // clocked by TCK; ClockDR and UpdateDR are the enables for the edge on
  // which the capture/shift stage and the update stage load.
  typedef struct packed {
    logic shift_dr;  // ShiftDR: 1 selects the serial input into FF1
    logic clock_dr;  // ClockDR: FF1 loads on this TCK rising edge
    logic update_dr; // UpdateDR: FF2 (and PGBSC FF3) load on this edge
    logic mode;      // Mode: 1 drives the cell output from FF2
    logic si;        // SI: signal-integrity test mode
    logic ce;        // CE: ND/SD detector cells enabled
    logic nd_sdn;    // ND/SD-bar: 1 selects ND flip-flops, 0 SD flip-flops
  } bsc_ctrl_t;

endpackage
