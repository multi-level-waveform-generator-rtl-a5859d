// tb_waveform_generator: self-checking test of the waveform generator.
//
// A non-overlapping PWM pair is driven cycle by cycle (A high, dead time,
// B high, dead time) with several delay codes and dead times.  Every
// nanosecond, half-way between stimulus edges, all six drives are compared
// with a reference worked out from the edge times alone:
//   C high from A falling to B rising, and from B falling + W to A rising + W
//   D high from A falling + W to B rising + W, and from B falling to A rising
//   A1 = A & ~C, A2 = A | (C & ~D), B1 = B & ~D, B2 = B | (D & ~C)
// where W = 30 ns + 45 ns * (1*CTRL[1] + 2*CTRL[2] + 3*CTRL[3] + 4*CTRL[4])
// is the delay-cell time.  It also measures the length of every C and D
// pulse that follows an A edge and compares it with W, and checks that the
// bypass outputs a_o, b_o follow A and B.
`timescale 1ns / 1ps
module tb_waveform_generator;
  import mlwg_pkg::*;

  logic        a, b, en;
  logic [4:1]  ctrl;
  drive_t      drv;
  logic        a_o, b_o;

  waveform_generator dut (
    .a(a), .b(b), .en(en), .ctrl(ctrl), .drv(drv), .a_o(a_o), .b_o(b_o)
  );

  int checks = 0, failures = 0;

  typedef enum logic [1:0] {PH_A, PH_GAP_A, PH_B, PH_GAP_B} phase_t;
  phase_t  phase;
  realtime t_ar, t_af, t_br, t_bf;
  int      w_ns;  // expected delay-cell time

  function automatic int expected_w(input logic [4:1] code);
    int units;
    units = 0;
    if (code[1]) units += 1;
    if (code[2]) units += 2;
    if (code[3]) units += 3;
    if (code[4]) units += 4;
    return 30 + 45 * units;
  endfunction

  function automatic drive_t ref_drive(input realtime now);
    drive_t r;
    logic   c, d;
    case (phase)
      PH_A:     begin c = (now < t_ar + w_ns); d = 1'b0; end
      PH_GAP_A: begin c = 1'b1; d = (now >= t_af + w_ns); end
      PH_B:     begin c = 1'b0; d = (now < t_br + w_ns); end
      default:  begin d = 1'b1; c = (now >= t_bf + w_ns); end
    endcase
    r.c  = c;
    r.d  = d;
    r.a1 = a & ~c;
    r.a2 = a | (c & ~d);
    r.b1 = b & ~d;
    r.b2 = b | (d & ~c);
    return r;
  endfunction

  // Sample every ns at the half-ns point.
  initial begin
    #0.5;
    forever begin
      if (en && armed) begin
        drive_t e;
        e = ref_drive($realtime);
        checks++;
        if (drv !== e || a_o !== a || b_o !== b) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH t=%0t ctrl=%b phase=%s drv=%b exp=%b",
                     $realtime, ctrl, phase.name(), drv, e);
        end
      end
      #1;
    end
  end

  // Pulse-length measurement: C after A falls, D after B rises (length W
  // when the dead time equals W).
  realtime c_rise, d_rise;
  logic    measure;
  logic    armed = 1'b0;  // reference valid
  always @(posedge drv.c) c_rise = $realtime;
  always @(posedge drv.d) d_rise = $realtime;
  always @(negedge drv.c) if (en && measure) begin
    checks++;
    if ($realtime - c_rise != real'(w_ns)) begin
      failures++;
      $display("C pulse %0.3f ns, expected %0d ns", $realtime - c_rise, w_ns);
    end
  end
  always @(negedge drv.d) if (en && measure) begin
    checks++;
    if ($realtime - d_rise != real'(w_ns)) begin
      failures++;
      $display("D pulse %0.3f ns, expected %0d ns", $realtime - d_rise, w_ns);
    end
  end

  task automatic pwm_cycle(input int ta, input int g1, input int tbh, input int g2);
    a = 1'b1; t_ar = $realtime; phase = PH_A;     #(ta);
    a = 1'b0; t_af = $realtime; phase = PH_GAP_A; #(g1);
    b = 1'b1; t_br = $realtime; phase = PH_B;     #(tbh);
    b = 1'b0; t_bf = $realtime; phase = PH_GAP_B; #(g2);
  endtask

  // Start with A steadily high, then enable.
  task automatic start(input logic [4:1] code);
    en = 1'b0;
    armed = 1'b0;
    ctrl = code;
    w_ns = expected_w(code);
    a = 1'b1; b = 1'b0; t_ar = $realtime; phase = PH_A;
    #1000;
    en = 1'b1;
    armed = 1'b1;
    #100;
    a = 1'b0; t_af = $realtime; phase = PH_GAP_A;
  endtask

  initial begin
    // en starts high and then falls, so the asynchronous clear sees an edge.
    a = 1'b0; b = 1'b0; en = 1'b1; ctrl = 4'b0000; measure = 1'b0;
    #1 en = 1'b0;
    phase = PH_GAP_B; t_ar = 0; t_af = 0; t_br = 0; t_bf = 0; w_ns = 30;
    c_rise = 0; d_rise = 0;
    // Dead time equal to W: pulse lengths must equal W.
    for (int code = 0; code < 16; code += 5) begin
      start(4'(code));
      measure = 1'b1;
      #(w_ns);
      b = 1'b1; t_br = $realtime; phase = PH_B; #(2000);
      b = 1'b0; t_bf = $realtime; phase = PH_GAP_B; #(w_ns);
      repeat (3) pwm_cycle(2000, w_ns, 2000, w_ns);
      measure = 1'b0;
      // Wider dead times give the zero level as well.
      repeat (2) pwm_cycle(1500, w_ns + 400, 1700, w_ns + 250);
      pwm_cycle(3000, w_ns + 50, 900, w_ns + 700);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
