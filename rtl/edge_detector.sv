// edge_detector: turns every rising and every falling edge of a PWM input
// into a pulse whose width is set by a 4-bit delay code.
//
// The input is delayed by rc_delay_cell and inverted, giving vdelay, a late
// copy of NOT vin.  For one delay time after a rising edge, vin and vdelay
// are both high, and the AND gate raises vout_pe.  For one delay time after
// a falling edge, both are low, and the NOR gate raises vout_ne.  Outside
// these windows the two signals differ and both outputs are low.  This
// structure (delay cell, inverter, AND, NOR) follows the published circuit.
//
// Interface: vin (PWM input), ctrl[4:1] (delay code, 0000 shortest, 1111
// longest), vout_pe / vout_ne (edge pulses).
// Timing: the pulses start with the input edge and last the delay of
// rc_delay_cell for the current code.  Just after power-up the outputs are
// meaningless until one delay time has passed.
`timescale 1ns / 1ps
module edge_detector
  import mlwg_pkg::*;
#(
  parameter int unsigned T_FIXED_PS = 30_000,  // delay at code 0000, ps
  parameter int unsigned T_STAGE_PS = 45_000   // R*C of one ladder stage, ps
) (
  input  logic               vin,
  input  logic [CTRL_BITS:1] ctrl,
  output logic               vout_pe,
  output logic               vout_ne
);

  logic vcell;   // delay-cell output, a late copy of vin
  logic vdelay;  // V_Delay: inverted delayed input

  rc_delay_cell #(
    .T_FIXED_PS(T_FIXED_PS),
    .T_STAGE_PS(T_STAGE_PS)
  ) u_delay (
    .vin (vin),
    .ctrl(ctrl),
    .vout(vcell)
  );

  assign vdelay  = ~vcell;
  assign vout_pe = vin & vdelay;       // AND: rising-edge window
  assign vout_ne = ~(vin | vdelay);    // NOR: falling-edge window

endmodule
