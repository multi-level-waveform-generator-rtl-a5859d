// hbridge_5level: BEHAVIOURAL MODEL of the six-switch 5-level H-bridge
// power stage that the waveform generator drives.  The real part is a set
// of power transistors and a load; this model only reports, from the six
// gate drives, which voltage each load terminal is tied to.
//
// Left terminal:  A1 to VDD, C to Vx = VDD/2, B2 to GND.
// Right terminal: B1 to VDD, D to Vx,         A2 to GND.
// The load voltage (left minus right) takes the five levels -VDD, -VDD/2,
// 0, +VDD/2, +VDD.  The model gives it as a signed count of VDD/2 steps
// (level, -2..+2) and in millivolts.  A terminal with no switch on is
// floating: driven is then 0 and the level reads 0.  Two switches on in one
// leg short two supplies: shoot_through is then 1 (level reads 0).  The
// switch arrangement follows the published 5-level bridge; the level
// encoding, the flags and the 5 V default supply are this model's choices.
//
// Timing: combinational, no switching delays.
`timescale 1ns / 1ps
module hbridge_5level
  import mlwg_pkg::*;
#(
  parameter int VDD_MV = 5000  // supply voltage, mV
) (
  input  drive_t            drv,
  output logic signed [2:0] level,        // load voltage in VDD/2 steps
  output int                v_load_mv,    // load voltage, mV
  output logic              driven,       // both terminals tied to a supply
  output logic              shoot_through // two switches on in one leg
);

  logic [1:0] left_half, right_half;  // terminal voltage in VDD/2 steps
  logic       left_ok, right_ok, left_short, right_short;

  always_comb begin
    left_short  = (int'(drv.a1) + int'(drv.c) + int'(drv.b2)) > 1;
    right_short = (int'(drv.b1) + int'(drv.d) + int'(drv.a2)) > 1;
    left_ok     = drv.a1 | drv.c | drv.b2;
    right_ok    = drv.b1 | drv.d | drv.a2;
    left_half   = drv.a1 ? 2'd2 : (drv.c ? 2'd1 : 2'd0);
    right_half  = drv.b1 ? 2'd2 : (drv.d ? 2'd1 : 2'd0);

    shoot_through = left_short | right_short;
    driven        = left_ok & right_ok & ~shoot_through;
    if (driven) level = 3'(signed'({1'b0, left_half}) - signed'({1'b0, right_half}));
    else        level = 3'sd0;
    v_load_mv = int'(level) * VDD_MV / 2;
  end

endmodule
