`timescale 1ns / 1ps
// nd_cell: behavioural model of the noise detector (ND) cell, an analog
// cross-coupled PMOS differential sense amplifier placed next to the
// receiving core. It is not synthesizable logic; it stands in for the
// transistor-level cell in simulation.
//
// The cell samples the voltage at the receiving end of an interconnect
// (here a millivolt code `vb_mv`). With the cell enabled (CE=1), its output
// c falls from 1 to 0 when the voltage rises above V_Hthr and stays 0 until
// the voltage drops below V_Hmin; between the two limits it keeps its
// state (hysteresis). With CE=0 the cell is off and c rests at 1. The
// threshold behaviour follows the design; the millivolt representation,
// the threshold values (the design gives none) and the resting level of
// c when disabled are this model's. The model has no delay: c follows the
// voltage immediately. The held state between the two thresholds is the
// cell's hysteresis, so `state` is an intended latch.
module nd_cell #(
  parameter int unsigned VHTHR_MV = 1980,  // V_Hthr: noise threshold
  parameter int unsigned VHMIN_MV = 1620   // V_Hmin: release threshold
) (
  input  logic [11:0] vb_mv,  // sampled voltage at the receiving end, mV
  input  logic        ce,     // cell enable
  output logic        c       // to the read-out flip-flop, 0 = noise
);

  logic state;

  always_latch begin
    if (!ce)                          state = 1'b1;
    else if (32'(vb_mv) > VHTHR_MV)   state = 1'b0;
    else if (32'(vb_mv) < VHMIN_MV)   state = 1'b1;
  end

  assign c = state;

endmodule
