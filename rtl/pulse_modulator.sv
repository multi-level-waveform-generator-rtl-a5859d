// pulse_modulator: second step of the combination logic.  It mixes the PWM
// pair A, B with the mid-supply drives C, D into the four main switch
// drives of the 5-level H-bridge.
//
//   A1 = NOR(NOT A, C)                 = A and not C
//   A2 = NAND(NAND(NOT D, C), NOT A)   = A or (C and not D)
//   B1 = NOR(NOT B, D)                 = B and not D
//   B2 = NAND(NAND(NOT C, D), NOT B)   = B or (D and not C)
//
// A1 and B1 (the VDD switches) fall with A and B but rise only once C or D
// has ended; A2 and B2 (the GND switches) rise with A and B but stay on
// while C (for A2) or D (for B2) holds the other leg at Vx.  Each drive thus
// keeps one edge of the PWM signal and takes the other edge from C or D.
// The gate network follows the published circuit.
//
// Interface: a, b (PWM pair), c, d (from cd_generator), drv (a1, a2, b1, b2
// pass through from here; drv.c and drv.d repeat c and d).
// Timing: purely combinational.
`timescale 1ns / 1ps
module pulse_modulator
  import mlwg_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  logic   c,
  input  logic   d,
  output drive_t drv
);

  logic a_n, b_n, c_n, d_n;
  logic nand_a, nand_b;

  assign a_n = ~a;
  assign b_n = ~b;
  assign c_n = ~c;
  assign d_n = ~d;

  assign nand_a = ~(d_n & c);
  assign nand_b = ~(c_n & d);

  assign drv.a1 = ~(a_n | c);
  assign drv.a2 = ~(nand_a & a_n);
  assign drv.b1 = ~(b_n | d);
  assign drv.b2 = ~(nand_b & b_n);
  assign drv.c  = c;
  assign drv.d  = d;

endmodule
