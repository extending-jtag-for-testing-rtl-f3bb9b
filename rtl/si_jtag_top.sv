`timescale 1ns / 1ps
// si_jtag_top: boundary-scan test architecture for signal-integrity testing
// of the N interconnects between two cores (core i sends, core j
// receives), controlled through an unmodified five-pin JTAG port.
//
// One boundary register runs from TDI to TDO through, in this order:
//   M standard cells on the input pins of core i,
//   N pattern generation cells (PGBSC) on the output pins of core i,
//   N observation cells (OBSC) on the input pins of core j,
//   K standard cells on the output pins of core j.
// A noise detector (ND) and a skew detector (SD) sit at the receiving end
// of every interconnect and feed the sticky flip-flops of its OBSC. The
// TAP controller, the instruction register with the G_SITEST and O_SITEST
// instructions and a one-bit bypass register complete the test logic. The
// cores and the interconnects are outside this module: their pins are the
// ports. A test runs, per initial value 0...0 and 1...1: SAMPLE/PRELOAD the
// initial value, load G_SITEST, shift the one-hot victim-select word, then
// per victim apply three Update-DRs and shift one 0 to move the victim.
// O_SITEST then reads the ND flip-flops with one DR scan and the SD
// flip-flops with the next.
//
// The placement of PGBSCs and OBSCs, the detectors and the instructions
// follow the design. The order of the cells in the chain, M=K=2, the
// analog interface of the detectors (a millivolt code per line and a
// system clock) and TDO being driven combinationally from the last stage
// (0 outside the shift states) are this implementation's. Timing: all
// test logic runs on the rising edge of TCK; the detectors run
// asynchronously to it.
module si_jtag_top
  import si_jtag_pkg::*;
#(
  parameter int unsigned N = 32,   // interconnects under test
  parameter int unsigned M = 2,    // standard cells on core i
  parameter int unsigned K = 2,    // standard cells on core j
  localparam int unsigned MW = (M > 0) ? M : 1,
  localparam int unsigned KW = (K > 0) ? K : 1
) (
  // JTAG port
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  input  logic              trst_n,
  output logic              tdo,
  // reference clock of the skew detectors (the clock launching data)
  input  logic              sys_clk,
  // core i: input pins and the core inputs behind them
  input  logic [MW-1:0]     core_i_pin,
  output logic [MW-1:0]     core_i_in,
  // core i outputs and the pins that drive the interconnects
  input  logic [N-1:0]      core_i_out,
  output logic [N-1:0]      iut_tx,
  // far end of the interconnects: logic level and voltage in mV
  input  logic [N-1:0]      iut_rx,
  input  logic [N-1:0][11:0] iut_rx_mv,
  output logic [N-1:0]      core_j_in,
  // core j outputs and its output pins
  input  logic [KW-1:0]     core_j_out,
  output logic [KW-1:0]     core_j_pin
);

  localparam int unsigned LEN = M + 2 * N + K;  // boundary register length

  tap_state_e state;
  logic       tap_reset;
  bsc_ctrl_t  ctrl;
  logic       ir_tdo;
  logic       bypass_sel;
  logic       bypass_q;
  logic [LEN:0] chain;   // chain[0] = TDI, chain[LEN] = last cell

  tap_controller u_tap (
    .tck, .trst_n, .tms,
    .state_o (state),
    .reset_o (tap_reset)
  );

  ir_decoder u_ir (
    .tck, .tap_reset, .state, .tdi,
    .instr_o    (),
    .ctrl_o     (ctrl),
    .ir_tdo     (ir_tdo),
    .bypass_sel (bypass_sel)
  );

  assign chain[0] = tdi;

  for (genvar g = 0; g < M; g++) begin : g_core_i_bsc
    std_bsc u_bsc (
      .tck, .rst (tap_reset), .ctrl,
      .pi    (core_i_pin[g]),
      .si_in (chain[g]),
      .so    (chain[g+1]),
      .po    (core_i_in[g])
    );
  end
  if (M == 0) begin : g_no_core_i_bsc
    assign core_i_in = core_i_pin;
  end

  for (genvar g = 0; g < N; g++) begin : g_pgbsc
    pgbsc u_pgbsc (
      .tck, .rst (tap_reset), .ctrl,
      .core_out (core_i_out[g]),
      .si_in    (chain[M+g]),
      .so       (chain[M+g+1]),
      .pin      (iut_tx[g])
    );
  end

  logic [N-1:0] nd_c, sd_c;

  for (genvar g = 0; g < N; g++) begin : g_obsc
    nd_cell u_nd (
      .vb_mv (iut_rx_mv[g]),
      .ce    (ctrl.ce),
      .c     (nd_c[g])
    );
    sd_cell u_sd (
      .clock (sys_clk),
      .b     (iut_rx[g]),
      .ce    (ctrl.ce),
      .c     (sd_c[g])
    );
    obsc u_obsc (
      .tck, .rst (tap_reset), .trst_n, .ctrl,
      .pin_in  (iut_rx[g]),
      .nd_c    (nd_c[g]),
      .sd_c    (sd_c[g]),
      .si_in   (chain[M+N+g]),
      .so      (chain[M+N+g+1]),
      .core_in (core_j_in[g]),
      .nd_flag (),
      .sd_flag ()
    );
  end

  for (genvar g = 0; g < K; g++) begin : g_core_j_bsc
    std_bsc u_bsc (
      .tck, .rst (tap_reset), .ctrl,
      .pi    (core_j_out[g]),
      .si_in (chain[M+2*N+g]),
      .so    (chain[M+2*N+g+1]),
      .po    (core_j_pin[g])
    );
  end
  if (K == 0) begin : g_no_core_j_bsc
    assign core_j_pin = core_j_out;
  end

  // One-bit bypass register: captures 0, shifts TDI.
  always_ff @(posedge tck) begin
    if (state == TAP_CAPTURE_DR)    bypass_q <= 1'b0;
    else if (state == TAP_SHIFT_DR) bypass_q <= tdi;
  end

  always_comb begin
    unique case (state)
      TAP_SHIFT_IR: tdo = ir_tdo;
      TAP_SHIFT_DR: tdo = bypass_sel ? bypass_q : chain[LEN];
      default:      tdo = 1'b0;
    endcase
  end

endmodule
