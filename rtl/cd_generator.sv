// cd_generator: first step of the combination logic.  It makes the two
// drives C and D of the mid-supply switches from the four edge pulses.
//
// How it works.  Each output is built from four toggle flip-flops, each
// clocked by one edge pulse, either directly (toggling when the pulse
// starts, i.e. at the PWM edge) or through an inverter (toggling when the
// pulse ends, i.e. one delay time after the PWM edge).  The exclusive-OR of
// two toggles is high between their clock events; the two exclusive-ORs of
// each output are combined by a NOR and an inverter (an OR).
//
//   C = (T[A_NE start] ^ T[B_PE start]) | (T[B_NE end] ^ T[A_PE end])
//     = high from A falling to B rising,
//       and from (B falling + delay) to (A rising + delay)
//   D = (T[A_NE end] ^ T[B_PE end]) | (T[B_NE start] ^ T[A_PE start])
//     = high from (A falling + delay) to (B rising + delay),
//       and from B falling to A rising
//
// So C covers the dead time after A and the first delay time of A, D the
// dead time after B and the first delay time of B.  The flip-flops, their
// inverted clocks, the exclusive-OR / NOR / inverter tree and the first
// half of each definition follow the published circuit; the pin-level
// reading of the flip-flop connections (D from Q-bar) is this design's.
//
// Interface: pulses (edge pulses of A and B), en (active-high; 0 clears all
// flip-flops), c, d.
// Timing: fully asynchronous, no clock.  Enable while A or B is steadily
// high, and with no edge pulse active; the pairs of toggles then start in
// step.  The PWM pair must be non-overlapping with dead times of at least
// one delay time for the intended sequence.
`timescale 1ns / 1ps
module cd_generator
  import mlwg_pkg::*;
(
  input  edge_pulses_t pulses,
  input  logic         en,
  output logic         c,
  output logic         d
);

  // Clocks of the eight toggles: the pulses and their inverses.
  logic a_ne_n, b_pe_n, b_ne_n, a_pe_n;
  assign a_ne_n = ~pulses.a_ne;
  assign b_pe_n = ~pulses.b_pe;
  assign b_ne_n = ~pulses.b_ne;
  assign a_pe_n = ~pulses.a_pe;

  // C group: A_NE, B_PE direct; B_NE, A_PE inverted.
  logic c_q_ane, c_q_bpe, c_q_bne, c_q_ape;
  toggle_dff u_c_ane (.clk(pulses.a_ne), .en(en), .q(c_q_ane));
  toggle_dff u_c_bpe (.clk(pulses.b_pe), .en(en), .q(c_q_bpe));
  toggle_dff u_c_bne (.clk(b_ne_n),      .en(en), .q(c_q_bne));
  toggle_dff u_c_ape (.clk(a_pe_n),      .en(en), .q(c_q_ape));

  // D group: A_NE, B_PE inverted; B_NE, A_PE direct.
  logic d_q_ane, d_q_bpe, d_q_bne, d_q_ape;
  toggle_dff u_d_ane (.clk(a_ne_n),      .en(en), .q(d_q_ane));
  toggle_dff u_d_bpe (.clk(b_pe_n),      .en(en), .q(d_q_bpe));
  toggle_dff u_d_bne (.clk(pulses.b_ne), .en(en), .q(d_q_bne));
  toggle_dff u_d_ape (.clk(pulses.a_pe), .en(en), .q(d_q_ape));

  logic c_nor, d_nor;
  assign c_nor = ~((c_q_ane ^ c_q_bpe) | (c_q_bne ^ c_q_ape));
  assign d_nor = ~((d_q_ane ^ d_q_bpe) | (d_q_bne ^ d_q_ape));
  assign c     = ~c_nor;
  assign d     = ~d_nor;

endmodule
