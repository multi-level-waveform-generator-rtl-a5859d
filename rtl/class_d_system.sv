// class_d_system: a low-distortion 5-level class D output stage: the
// multi-level waveform generator driving the six-switch H-bridge.
//
// The PWM pair (A, B) that would drive a conventional 3-level bridge enters
// the waveform generator, which inserts a +-VDD/2 step of programmable
// length (delay code ctrl) at each PWM edge.  Its six drives go to the
// 5-level bridge model, whose load voltage then steps through
// +VDD, +VDD/2, 0, -VDD/2, -VDD and back.  The PWM modulator that makes A
// and B lies outside this block: A and B are ports.
//
// Interface: a, b, en, ctrl[4:1] in; the six drives, the unchanged a_o,
// b_o for a 3-level bridge, and the bridge model's level (VDD/2 steps),
// v_load_mv, driven and shoot_through out.
// Timing: asynchronous, as in waveform_generator.
`timescale 1ns / 1ps
module class_d_system
  import mlwg_pkg::*;
#(
  parameter int unsigned T_FIXED_PS = 30_000,  // delay at code 0000, ps
  parameter int unsigned T_STAGE_PS = 45_000,  // R*C of one ladder stage, ps
  parameter int          VDD_MV     = 5000     // bridge supply, mV
) (
  input  logic               a,
  input  logic               b,
  input  logic               en,
  input  logic [CTRL_BITS:1] ctrl,
  output drive_t             drv,
  output logic               a_o,
  output logic               b_o,
  output logic signed [2:0]  level,
  output int                 v_load_mv,
  output logic               driven,
  output logic               shoot_through
);

  waveform_generator #(
    .T_FIXED_PS(T_FIXED_PS),
    .T_STAGE_PS(T_STAGE_PS)
  ) u_gen (
    .a   (a),
    .b   (b),
    .en  (en),
    .ctrl(ctrl),
    .drv (drv),
    .a_o (a_o),
    .b_o (b_o)
  );

  hbridge_5level #(
    .VDD_MV(VDD_MV)
  ) u_bridge (
    .drv          (drv),
    .level        (level),
    .v_load_mv    (v_load_mv),
    .driven       (driven),
    .shoot_through(shoot_through)
  );

endmodule
