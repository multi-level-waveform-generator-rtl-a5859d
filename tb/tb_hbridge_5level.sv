// tb_hbridge_5level: exhaustive check of the 5-level bridge model.  For all
// 64 switch patterns the terminal voltages are worked out leg by leg
// (VDD = 2, Vx = 1, GND = 0 in VDD/2 steps); a leg with two switches on is
// a shoot-through, a leg with none is floating.  Level, millivolts, the
// driven flag and the shoot-through flag are compared.  It also counts that
// all five levels occur among the legal patterns.
`timescale 1ns / 1ps
module tb_hbridge_5level;
  import mlwg_pkg::*;

  drive_t            drv;
  logic signed [2:0] level;
  int                mv;
  logic              driven, shoot;

  hbridge_5level dut (.drv(drv), .level(level), .v_load_mv(mv), .driven(driven),
                      .shoot_through(shoot));

  int checks = 0, failures = 0;
  int seen[5];

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < 64; v++) begin
      int vl, vr, nl, nr, e_level;
      logic e_shoot, e_driven;
      drv = 6'(v);
      #1;
      nl = 0; nr = 0; vl = 0; vr = 0;
      if (drv.a1) begin nl++; vl = 2; end
      if (drv.c)  begin nl++; vl = 1; end
      if (drv.b2) begin nl++; vl = 0; end
      if (drv.b1) begin nr++; vr = 2; end
      if (drv.d)  begin nr++; vr = 1; end
      if (drv.a2) begin nr++; vr = 0; end
      e_shoot  = (nl > 1) || (nr > 1);
      e_driven = (nl == 1) && (nr == 1);
      e_level  = e_driven ? vl - vr : 0;
      checks++;
      if (shoot !== e_shoot || driven !== e_driven || int'(level) != e_level
          || mv != e_level * 2500) begin
        failures++;
        $display("drv=%b: level=%0d mv=%0d driven=%b shoot=%b, expected %0d %b %b",
                 drv, level, mv, driven, shoot, e_level, e_driven, e_shoot);
      end
      if (e_driven) seen[e_level + 2]++;
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("level %0d never produced", i - 2);
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
