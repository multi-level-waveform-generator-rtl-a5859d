// tb_pulse_modulator: exhaustive check of the output gates.  For all
// sixteen combinations of A, B, C, D the four main drives are compared with
// the rule that each keeps one PWM edge: A1 is A with its rise held off
// while C is high, A2 is A held on while C (and not D) is high, and the
// same for B1, B2 with D and C exchanged.  C and D must pass through.
`timescale 1ns / 1ps
module tb_pulse_modulator;
  import mlwg_pkg::*;

  logic   a, b, c, d;
  drive_t drv;

  pulse_modulator dut (.a(a), .b(b), .c(c), .d(d), .drv(drv));

  int checks = 0, failures = 0;

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic e_a1, e_a2, e_b1, e_b2;
      {a, b, c, d} = 4'(v);
      #1;
      e_a1 = (a && !c) ? 1'b1 : 1'b0;
      e_a2 = (a || (c && !d)) ? 1'b1 : 1'b0;
      e_b1 = (b && !d) ? 1'b1 : 1'b0;
      e_b2 = (b || (d && !c)) ? 1'b1 : 1'b0;
      checks++;
      if ({drv.a1, drv.a2, drv.b1, drv.b2, drv.c, drv.d} !== {e_a1, e_a2, e_b1, e_b2, c, d}) begin
        failures++;
        $display("a=%b b=%b c=%b d=%b: drv=%b expected %b", a, b, c, d, drv,
                 {e_a1, e_a2, e_b1, e_b2, c, d});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
