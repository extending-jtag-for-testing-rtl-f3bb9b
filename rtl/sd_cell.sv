`timescale 1ns / 1ps
// sd_cell: behavioural model of the skew detector (SD) cell, an analog
// cell made of a delay generator (a chain of inverters on the clock) and a
// gate that compares the delayed clock with the far end of an
// interconnect. It is not synthesizable logic; it stands in for the
// transistor-level cell in simulation.
//
// The delay generator defines the skew-immune window WINDOW_NS after each
// rising edge of `clock`. When the enabled cell (CE=1) sees the
// interconnect output `b` change later than that window, it issues a
// 0 -> 1 -> 0 pulse on c whose width equals the time by which the signal
// was late. A change inside the window gives no pulse; with CE=0 c stays 0.
// The window, the pulse and CE follow the design; modelling the comparison
// as "a change of b after the window" rather than as the transistor
// circuit, the pulse width rule and the default window are this model's.
module sd_cell #(
  parameter real WINDOW_NS = 5.0   // skew-immune window after the clock
) (
  input  logic clock,   // clock that launches the interconnect transition
  input  logic b,       // far end of the interconnect
  input  logic ce,      // cell enable
  output logic c        // to the read-out flip-flop, pulse = skew violation
);

  realtime t_clock;
  realtime late;

  initial begin
    c       = 1'b0;
    t_clock = 0.0;
  end

  always @(posedge clock) t_clock <= $realtime;

  always @(b) begin
    late = $realtime - t_clock - WINDOW_NS;
    if (ce && late > 0.0) begin
      c = 1'b1;
      #(late) c = 1'b0;
    end
  end

endmodule
