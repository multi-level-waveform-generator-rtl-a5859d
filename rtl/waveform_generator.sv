// waveform_generator: the multi-level waveform generator IC.  It converts
// a PWM pair (A, B) for a conventional 3-level H-bridge into the six switch
// drives of a 5-level H-bridge, inserting a +-VDD/2 step of adjustable
// length at every PWM edge.
//
// Structure: two edge detectors (one on A, one on B) share the 4-bit delay
// code and produce the pulses A_PE, A_NE, B_PE, B_NE; cd_generator turns
// them into C and D; pulse_modulator mixes C, D with A, B into A1, A2, B1,
// B2.  As on the fabricated part, A and B are also brought out unchanged
// (a_o, b_o) to drive a conventional 3-level bridge, giving eight outputs.
//
// Interface: a, b (non-overlapping PWM pair), en (active-high enable, clears
// the flip-flops when low), ctrl[4:1] (delay code), drv (six drives), a_o,
// b_o.
// Timing: asynchronous.  Each intermediate step lasts one delay-cell time,
// set by ctrl.  The dead times between A and B, and the A and B pulses, must
// be at least that long; assertions flag overlapping inputs and pulses
// shorter than the delay.
// Raise en while A or B is steadily high, at least one delay time after
// power-up and after the last PWM edge.
`timescale 1ns / 1ps
module waveform_generator
  import mlwg_pkg::*;
#(
  parameter int unsigned T_FIXED_PS = 30_000,  // delay at code 0000, ps
  parameter int unsigned T_STAGE_PS = 45_000   // R*C of one ladder stage, ps
) (
  input  logic               a,
  input  logic               b,
  input  logic               en,
  input  logic [CTRL_BITS:1] ctrl,
  output drive_t             drv,
  output logic               a_o,
  output logic               b_o
);

  edge_pulses_t pulses;
  logic         c, d;

  edge_detector #(
    .T_FIXED_PS(T_FIXED_PS),
    .T_STAGE_PS(T_STAGE_PS)
  ) u_edge_a (
    .vin    (a),
    .ctrl   (ctrl),
    .vout_pe(pulses.a_pe),
    .vout_ne(pulses.a_ne)
  );

  edge_detector #(
    .T_FIXED_PS(T_FIXED_PS),
    .T_STAGE_PS(T_STAGE_PS)
  ) u_edge_b (
    .vin    (b),
    .ctrl   (ctrl),
    .vout_pe(pulses.b_pe),
    .vout_ne(pulses.b_ne)
  );

  cd_generator u_cd (
    .pulses(pulses),
    .en    (en),
    .c     (c),
    .d     (d)
  );

  pulse_modulator u_mod (
    .a  (a),
    .b  (b),
    .c  (c),
    .d  (d),
    .drv(drv)
  );

  assign a_o = a;
  assign b_o = b;

  // Input rules (simulation only).  A and B must not overlap, and each
  // pulse must outlast the delay.  A pulse that ended too early leaves its
  // detector's delayed copy still low, so the falling-edge pulse is missing
  // just after the fall (checked 1 ps later, once the gates have settled).
  // These checks read en synchronously, which lint reports as a mixed use
  // of the flip-flops' asynchronous clear; they produce no hardware.
  always @(posedge a) if (en) assert (!b) else $error("A rose while B is high");
  always @(posedge b) if (en) assert (!a) else $error("B rose while A is high");
  always @(negedge a) if (en) begin
    #1ps;
    assert (pulses.a_ne) else $error("A pulse shorter than the delay");
  end
  always @(negedge b) if (en) begin
    #1ps;
    assert (pulses.b_ne) else $error("B pulse shorter than the delay");
  end

endmodule
