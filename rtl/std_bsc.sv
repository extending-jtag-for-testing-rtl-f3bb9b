`timescale 1ns / 1ps
// std_bsc: standard IEEE 1149.1 boundary-scan cell.
//
// FF1 is the capture/shift stage: with ClockDR it loads the parallel input
// (ShiftDR=0, capture) or the serial input from the previous cell
// (ShiftDR=1, shift). Its output is the serial output to the next cell.
// FF2 is the update stage: with UpdateDR it loads FF1. The Mode mux drives
// the parallel output from the parallel input (normal operation) or from
// FF2 (test). The structure follows the design's standard cell; the
// synchronous enables on TCK in place of gated ClockDR/UpdateDR clocks
// and the reset of both stages are this implementation's.
module std_bsc
  import si_jtag_pkg::*;
(
  input  logic      tck,
  input  logic      rst,      // from Test-Logic-Reset (asynchronous)
  input  bsc_ctrl_t ctrl,
  input  logic      pi,       // input pin or core output
  input  logic      si_in,    // serial in: TDI or previous cell
  output logic      so,       // serial out: TDO or next cell (Q1)
  output logic      po        // output pin or core input
);

  logic q1, q2;

  always_ff @(posedge tck or posedge rst) begin
    if (rst) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      if (ctrl.clock_dr)  q1 <= ctrl.shift_dr ? si_in : pi;
      if (ctrl.update_dr) q2 <= q1;
    end
  end

  assign so = q1;
  assign po = ctrl.mode ? q2 : pi;

endmodule
