`timescale 1ns / 1ps
// pgbsc: pattern generation boundary-scan cell, placed on an output pin of
// the sending core that drives an interconnect under test.
//
// It is a standard cell with two additions. A feedback mux ahead of FF2
// loads the complement of FF2 instead of FF1 when SI=1, so each clock of
// FF2 toggles the driven line. A toggle flip-flop FF3, clocked by every
// UpdateDR, divides UpdateDR by two; a mux selected by (Q1 AND SI) clocks
// FF2 from FF3 instead of from UpdateDR. FF1 holds one bit of the one-hot
// victim-select word, so:
//   SI=1, Q1=1  victim mode: the line toggles on every second UpdateDR
//   SI=1, Q1=0  aggressor mode: the line toggles on every UpdateDR
//   SI=0        normal mode: a standard boundary-scan cell
// Starting from all lines at the initial value, three UpdateDRs give the
// maximum-aggressor sequence 00000 -> 11011 -> 00100 -> 11111 (victim in
// the middle), after which every line holds the complement of its start.
//
// This follows the design's cell. Choices of this implementation: all
// flip-flops are clocked by TCK and the gated clocks become enables (the
// FF3-derived clock of FF2 becomes "UpdateDR while Q3 is 0", the edge on
// which FF3 rises); FF3 is preset to 1 whenever SI=0 or FF1 is clocked, so
// after each victim-select shift the victim toggles on the second of the
// three pattern UpdateDRs; both stages reset to 0 in Test-Logic-Reset.
module pgbsc
  import si_jtag_pkg::*;
(
  input  logic      tck,
  input  logic      rst,       // from Test-Logic-Reset (asynchronous)
  input  bsc_ctrl_t ctrl,
  input  logic      core_out,  // output of the sending core
  input  logic      si_in,     // serial in: TDI or previous cell
  output logic      so,        // serial out: TDO or next cell (Q1)
  output logic      pin        // output pin, drives the interconnect
);

  logic q1, q2, q3;
  logic victim;      // Q1 AND SI: select FF3 as the clock of FF2
  logic ff2_en;      // an active edge of CLK-FF2 on this TCK edge
  logic d2;

  assign victim = q1 & ctrl.si;
  assign ff2_en = victim ? (ctrl.update_dr & ~q3) : ctrl.update_dr;
  assign d2     = ctrl.si ? ~q2 : q1;

  always_ff @(posedge tck or posedge rst) begin
    if (rst) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
      q3 <= 1'b1;
    end else begin
      if (ctrl.clock_dr) q1 <= ctrl.shift_dr ? si_in : core_out;
      if (ff2_en)        q2 <= d2;
      if (!ctrl.si || ctrl.clock_dr) q3 <= 1'b1;
      else if (ctrl.update_dr)       q3 <= ~q3;
    end
  end

  assign so  = q1;
  assign pin = ctrl.mode ? q2 : core_out;

endmodule
