// mlwg_pkg: types and helpers shared by the multi-level waveform generator.
//
// The generator turns a PWM pair (A, B) into the six switch drives of a
// 5-level H-bridge.  Two bundles recur between its blocks: the four edge
// pulses of A and B, and the six switch drives.  The helper
// ladder_weight() gives the relative delay of the switched RC ladder in the
// edge detector's delay cell for a 4-bit control code (see rc_delay_cell).
`timescale 1ns / 1ps
package mlwg_pkg;

  // Number of control bits of the delay cell (CTRL[1]..CTRL[4]).
  localparam int unsigned CTRL_BITS = 4;

  // Edge pulses of the two PWM inputs: *_pe is high for one delay-cell time
  // after a rising edge, *_ne for one delay-cell time after a falling edge.
  typedef struct packed {
    logic a_pe;
    logic a_ne;
    logic b_pe;
    logic b_ne;
  } edge_pulses_t;

  // Gate drives of the six switches of the 5-level H-bridge.
  //   a1: left leg to VDD     b2: left leg to GND     c: left leg to Vx
  //   b1: right leg to VDD    a2: right leg to GND    d: right leg to Vx
  typedef struct packed {
    logic a1;
    logic a2;
    logic b1;
    logic b2;
    logic c;
    logic d;
  } drive_t;

  // Elmore weight of the four-stage ladder: every stage has the same R and
  // the same C, and the capacitor at node k (CTRL[k]) charges through k
  // resistors, so it adds k units of R*C to the delay.  Code 0000 gives 0,
  // code 1111 gives 1+2+3+4 = 10.
  function automatic int unsigned ladder_weight(input logic [CTRL_BITS:1] ctrl);
    int unsigned w;
    w = 0;
    for (int unsigned k = 1; k <= CTRL_BITS; k++) begin
      if (ctrl[k]) w += k;
    end
    return w;
  endfunction

endpackage
