// tb_cd_generator: checks the C/D flip-flop logic on its own.  The test
// drives the four edge pulses itself: for each PWM edge it raises the
// matching pulse for W ns (W varied from cycle to cycle).  Every ns,
// half-way between stimulus edges, C and D are compared with
//   C high from A falling to B rising, and from B falling + W to A rising + W
//   D high from A falling + W to B rising + W, and from B falling to A rising.
// It also checks that dropping en clears both outputs.
`timescale 1ns / 1ps
module tb_cd_generator;
  import mlwg_pkg::*;

  edge_pulses_t p;
  logic         en, c, d;

  cd_generator dut (.pulses(p), .en(en), .c(c), .d(d));

  int checks = 0, failures = 0;

  typedef enum logic [1:0] {PH_A, PH_GAP_A, PH_B, PH_GAP_B} phase_t;
  phase_t  phase;
  realtime t_ar, t_af, t_br, t_bf;
  int      w_ns;

  function automatic logic [1:0] ref_cd(input realtime now);
    logic rc, rd;
    case (phase)
      PH_A:     begin rc = (now < t_ar + w_ns); rd = 1'b0; end
      PH_GAP_A: begin rc = 1'b1; rd = (now >= t_af + w_ns); end
      PH_B:     begin rc = 1'b0; rd = (now < t_br + w_ns); end
      default:  begin rd = 1'b1; rc = (now >= t_bf + w_ns); end
    endcase
    return {rc, rd};
  endfunction

  initial begin
    #0.5;
    forever begin
      if (en) begin
        checks++;
        if ({c, d} !== ref_cd($realtime)) begin
          failures++;
          if (failures < 10)
            $display("t=%0.1f phase=%s c=%b d=%b expected %b", $realtime, phase.name(),
                     c, d, ref_cd($realtime));
        end
      end
      #1;
    end
  end

  // One PWM cycle expressed as edge pulses of width w_ns.
  task automatic cycle(input int ta, input int g1, input int tbh, input int g2);
    phase = PH_A;     t_ar = $realtime; p.a_pe = 1'b1; #(w_ns); p.a_pe = 1'b0; #(ta - w_ns);
    phase = PH_GAP_A; t_af = $realtime; p.a_ne = 1'b1; #(w_ns); p.a_ne = 1'b0; #(g1 - w_ns);
    phase = PH_B;     t_br = $realtime; p.b_pe = 1'b1; #(w_ns); p.b_pe = 1'b0; #(tbh - w_ns);
    phase = PH_GAP_B; t_bf = $realtime; p.b_ne = 1'b1; #(w_ns); p.b_ne = 1'b0; #(g2 - w_ns);
  endtask

  initial begin
    // en starts high and then falls, so the asynchronous clear sees an edge.
    p = '0; en = 1'b1; phase = PH_A; w_ns = 100;
    #1 en = 1'b0;
    t_ar = 0; t_af = 0; t_br = 0; t_bf = 0;
    #500;
    en = 1'b1;
    // First half cycle from the enabled, A-high state.
    #100;
    phase = PH_GAP_A; t_af = $realtime; p.a_ne = 1'b1; #(w_ns); p.a_ne = 1'b0; #(w_ns);
    phase = PH_B;     t_br = $realtime; p.b_pe = 1'b1; #(w_ns); p.b_pe = 1'b0; #(800);
    phase = PH_GAP_B; t_bf = $realtime; p.b_ne = 1'b1; #(w_ns); p.b_ne = 1'b0; #(w_ns);
    for (int i = 0; i < 40; i++) begin
      int g1, g2;
      w_ns = 20 + ($urandom % 460);
      g1 = w_ns + ($urandom % 3) * ($urandom % 300);
      g2 = w_ns + ($urandom % 3) * ($urandom % 300);
      cycle(w_ns + 1 + ($urandom % 3000), g1, w_ns + 1 + ($urandom % 3000), g2);
    end
    // Clear: outputs go low at once and stay low while disabled.
    phase = PH_A; t_ar = $realtime; p.a_pe = 1'b1; #(w_ns / 2);
    en = 1'b0;
    #0.5;
    checks++;
    if (c !== 1'b0 || d !== 1'b0) begin
      failures++;
      $display("en low did not clear c=%b d=%b", c, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
