`timescale 1ns / 1ps
// obsc: observation boundary-scan cell, placed on an input pin of the
// receiving core at the far end of an interconnect under test.
//
// Besides the standard FF1/FF2 stages it holds two sticky flip-flops, the
// ND FF and the SD FF. The ND FF is set to 1 by a falling edge of the
// noise detector output (the detector drives 0 while it sees noise); the
// SD FF is set to 1 by a rising edge of the skew detector output (a pulse
// per skew violation). Both record only while CE=1 and hold their value
// while CE=0. A mux selected by ND/SD-bar picks one of them, and a second
// mux selected by sel = (NOT SI) OR ShiftDR feeds FF1 either from it
// (sel=0: Capture-DR under SI) or from the standard capture/shift mux
// (sel=1). The three observation modes are
//   SI=1, ND/SD-bar=1  NDFF mode: Capture-DR loads the ND FF into FF1
//   SI=1, ND/SD-bar=0  SDFF mode: Capture-DR loads the SD FF into FF1
//   SI=0               normal mode: a standard boundary-scan cell
// This follows the design's cell. Choices of this implementation: FF1/FF2
// use TCK with ClockDR/UpdateDR as enables; the ND/SD flip-flops are
// clocked directly by the detector outputs, as the design triggers them,
// and are cleared only by the asynchronous JTAG reset TRST, so a result
// survives any instruction sequence until it is read; FF1/FF2 reset in
// Test-Logic-Reset.
module obsc
  import si_jtag_pkg::*;
(
  input  logic      tck,
  input  logic      rst,       // from Test-Logic-Reset (asynchronous)
  input  logic      trst_n,    // JTAG TRST, clears the ND/SD flip-flops
  input  bsc_ctrl_t ctrl,
  input  logic      pin_in,    // input pin, far end of the interconnect
  input  logic      nd_c,      // noise detector output, 1 -> 0 on noise
  input  logic      sd_c,      // skew detector output, 0 -> 1 -> 0 pulse
  input  logic      si_in,     // serial in: TDI or previous cell
  output logic      so,        // serial out: TDO or next cell (Q1)
  output logic      core_in,   // input of the receiving core
  output logic      nd_flag,   // ND FF, for observation
  output logic      sd_flag    // SD FF, for observation
);

  logic q1, q2;
  logic nd_ff, sd_ff;
  logic sel;
  logic det_q;     // ND FF or SD FF, chosen by ND/SD-bar
  logic std_d;     // standard capture/shift mux
  logic d1;

  always_ff @(negedge nd_c or negedge trst_n) begin
    if (!trst_n)      nd_ff <= 1'b0;
    else if (ctrl.ce) nd_ff <= 1'b1;
  end

  always_ff @(posedge sd_c or negedge trst_n) begin
    if (!trst_n)      sd_ff <= 1'b0;
    else if (ctrl.ce) sd_ff <= 1'b1;
  end

  assign sel   = ~ctrl.si | ctrl.shift_dr;
  assign det_q = ctrl.nd_sdn ? nd_ff : sd_ff;
  assign std_d = ctrl.shift_dr ? si_in : pin_in;
  assign d1    = sel ? std_d : det_q;

  always_ff @(posedge tck or posedge rst) begin
    if (rst) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      if (ctrl.clock_dr)  q1 <= d1;
      if (ctrl.update_dr) q2 <= q1;
    end
  end

  assign so      = q1;
  assign core_in = ctrl.mode ? q2 : pin_in;
  assign nd_flag = nd_ff;
  assign sd_flag = sd_ff;

endmodule
