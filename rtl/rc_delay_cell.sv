// rc_delay_cell: BEHAVIOURAL MODEL of the analog, code-controlled delay cell
// inside each edge detector.  It is not synthesizable logic.
//
// The real cell is an input inverter, a ladder of four equal series
// resistors, a capacitor of equal size at each of the four ladder nodes that
// CTRL[1]..CTRL[4] switch in (CTRL[1] nearest the input), and an output
// inverter, so vout follows vin after a delay.  Code 0000 gives the shortest
// delay and 1111 the longest.
//
// The model delays every edge of vin by
//     T_FIXED_PS + T_STAGE_PS * ladder_weight(ctrl)
// picoseconds, where ladder_weight() is the Elmore sum 1*CTRL[1] + 2*CTRL[2]
// + 3*CTRL[3] + 4*CTRL[4] of the equal RC stages.  T_FIXED_PS stands for the
// two inverters and the ladder with all capacitors off.  With the defaults,
// code 1111 gives 30 ns + 10 * 45 ns = 480 ns, the largest delay reported
// for the fabricated part; the 30 ns minimum and the Elmore law are this
// model's own choices.  Because the stages are equal, some codes share a
// delay (0011 and 0100 both give 3 units): the sixteen codes give eleven
// distinct delays.  Sixteen distinct steps would need binary-weighted
// capacitors; to model that, change ladder_weight() in mlwg_pkg.
// The delay is inertial: an input pulse shorter than the delay does not
// reach the output.  The code is sampled at each input edge.
//
// Interface: vin (PWM input), ctrl[4:1] (delay code), vout (delayed vin).
`timescale 1ps / 1ps
module rc_delay_cell
  import mlwg_pkg::*;
#(
  parameter int unsigned T_FIXED_PS = 30_000,  // delay at code 0000, ps
  parameter int unsigned T_STAGE_PS = 45_000   // R*C of one ladder stage, ps
) (
  input  logic               vin,
  input  logic [CTRL_BITS:1] ctrl,
  output logic               vout
);

  // This file counts time in picoseconds (see the timescale above).
  int unsigned delay_ps;

  always_comb begin
    delay_ps = T_FIXED_PS + T_STAGE_PS * ladder_weight(ctrl);
  end

  logic level;  // input level being carried through the ladder

  // Inertial delay: an input level reaches vout only after it has been held
  // for the whole delay; a pulse shorter than the delay is absorbed, as the
  // RC ladder would.  At power-up vout is unknown for one delay time.
  always begin
    if (vout === vin) @(vin);
    level = vin;
    fork
      #(delay_ps);
      @(vin);
    join_any
    disable fork;
    if (vin === level) vout = level;
  end

endmodule
