// tb_class_d_system: end-to-end test of the 5-level class D stage at its
// default parameters, following the measured operating points: PWM at
// 100 kHz and 200 kHz with delay codes 0000 and 1111, and B rising one
// delay time after A falls (and A rising one delay time after B falls).
// A further run at 200 kHz modulates the pulse widths along a sine and
// widens the dead times, so the zero level appears, and changes the delay
// code on the fly while A is steadily high.
//
// Every ns, half-way between stimulus edges, the load level is compared
// with the staircase worked out from the edge times:
//   after A rises:  +VDD/2 for W, then +VDD
//   after A falls:  +VDD/2 for W, then 0
//   after B rises:  -VDD/2 for W, then -VDD
//   after B falls:  -VDD/2 for W, then 0
// with W = 30 ns + 45 ns * (1*CTRL[1] + 2*CTRL[2] + 3*CTRL[3] + 4*CTRL[4]).
// Both terminals must be driven, no leg may short two supplies, and the
// 3-level outputs must follow A and B.  The length of every +-VDD/2 step is
// measured against W.  The test counts each mechanism (each of the five
// levels, intermediate steps at code 0000 and 1111, the zero level, an
// on-the-fly code change, the enable clear) and fails if one never occurs.
`timescale 1ns / 1ps
module tb_class_d_system;
  import mlwg_pkg::*;

  logic              a, b, en;
  logic [4:1]        ctrl;
  drive_t            drv;
  logic              a_o, b_o;
  logic signed [2:0] level;
  int                v_load_mv;
  logic              driven, shoot;

  class_d_system dut (
    .a(a), .b(b), .en(en), .ctrl(ctrl), .drv(drv), .a_o(a_o), .b_o(b_o),
    .level(level), .v_load_mv(v_load_mv), .driven(driven), .shoot_through(shoot)
  );

  int checks = 0, failures = 0;

  typedef enum logic [1:0] {PH_A, PH_GAP_A, PH_B, PH_GAP_B} phase_t;
  phase_t  phase;
  realtime t_ar, t_af, t_br, t_bf;
  int      w_ns;
  logic    armed;

  // Mechanism counters.
  int n_level[5];
  int n_step_code0 = 0, n_step_code15 = 0, n_code_change = 0, n_clear = 0;

  function automatic int expected_w(input logic [4:1] code);
    int units;
    units = 0;
    if (code[1]) units += 1;
    if (code[2]) units += 2;
    if (code[3]) units += 3;
    if (code[4]) units += 4;
    return 30 + 45 * units;
  endfunction

  function automatic int ref_level(input realtime now);
    case (phase)
      PH_A:     return (now < t_ar + w_ns) ?  1 :  2;
      PH_GAP_A: return (now < t_af + w_ns) ?  1 :  0;
      PH_B:     return (now < t_br + w_ns) ? -1 : -2;
      default:  return (now < t_bf + w_ns) ? -1 :  0;
    endcase
  endfunction

  initial begin
    #0.5;
    forever begin
      if (armed) begin
        int e;
        e = ref_level($realtime);
        checks++;
        if (int'(level) != e || !driven || shoot || a_o !== a || b_o !== b
            || v_load_mv != e * 2500) begin
          failures++;
          if (failures < 10)
            $display("t=%0.1f ctrl=%b phase=%s drv=%b level=%0d driven=%b shoot=%b expected %0d",
                     $realtime, ctrl, phase.name(), drv, level, driven, shoot, e);
        end
        n_level[e + 2]++;
      end
      #1;
    end
  end

  // Length of each +-VDD/2 step: from entering +-1 to leaving it.
  realtime           t_step;
  logic signed [2:0] prev_level = 3'sd0;
  always @(level) begin
    if (armed && t_step >= 0 && (prev_level == 3'sd1 || prev_level == -3'sd1)) begin
      checks++;
      if ($realtime - t_step != real'(w_ns)) begin
        failures++;
        $display("step of %0.3f ns at t=%0.1f, expected %0d ns", $realtime - t_step,
                 $realtime, w_ns);
      end
      if (ctrl == 4'b0000) n_step_code0++;
      if (ctrl == 4'b1111) n_step_code15++;
    end
    t_step     = (armed && (level == 3'sd1 || level == -3'sd1)) ? $realtime : -1;
    prev_level = level;
  end

  task automatic pwm_cycle(input int ta, input int g1, input int tbh, input int g2);
    a = 1'b1; t_ar = $realtime; phase = PH_A;     #(ta);
    a = 1'b0; t_af = $realtime; phase = PH_GAP_A; #(g1);
    b = 1'b1; t_br = $realtime; phase = PH_B;     #(tbh);
    b = 1'b0; t_bf = $realtime; phase = PH_GAP_B; #(g2);
  endtask

  // Disable, set the code, hold A high, enable; ends at A falling.
  task automatic start(input logic [4:1] code);
    armed = 1'b0;
    t_step = -1;
    en = 1'b0;
    n_clear++;
    ctrl = code;
    w_ns = expected_w(code);
    a = 1'b1; b = 1'b0; t_ar = $realtime; phase = PH_A;
    #1000;
    checks++;
    if (drv.c || drv.d) begin
      failures++;
      $display("enable low did not clear C and D");
    end
    en = 1'b1;
    #10;
    armed = 1'b1;
    #100;
  endtask

  // Measured operating point: period_ns, dead time equal to the delay.
  task automatic measured_point(input int period_ns, input logic [4:1] code, input int cycles);
    int half;
    start(code);
    half = period_ns / 2;
    // Finish the first A pulse, then run whole cycles.
    a = 1'b0; t_af = $realtime; phase = PH_GAP_A; #(w_ns);
    b = 1'b1; t_br = $realtime; phase = PH_B;     #(half - w_ns);
    b = 1'b0; t_bf = $realtime; phase = PH_GAP_B; #(w_ns);
    repeat (cycles) pwm_cycle(half - w_ns, w_ns, half - w_ns, w_ns);
  endtask

  initial begin
    // en starts high and then falls, so the asynchronous clear sees an edge.
    a = 1'b0; b = 1'b0; en = 1'b1; ctrl = 4'b0000; armed = 1'b0; w_ns = 30;
    phase = PH_A; t_ar = 0; t_af = 0; t_br = 0; t_bf = 0; t_step = -1;
    foreach (n_level[i]) n_level[i] = 0;
    #1;

    measured_point(10_000, 4'b0000, 3);  // 100 kHz, shortest step
    measured_point(10_000, 4'b1111, 3);  // 100 kHz, longest step
    measured_point(5_000,  4'b0000, 3);  // 200 kHz, shortest step
    measured_point(5_000,  4'b1111, 3);  // 200 kHz, longest step

    // 200 kHz, sine-modulated widths, wider dead times, code changed on the
    // fly during a long A pulse.
    start(4'b0101);
    a = 1'b0; t_af = $realtime; phase = PH_GAP_A; #(w_ns + 200);
    b = 1'b1; t_br = $realtime; phase = PH_B;     #(1500);
    b = 1'b0; t_bf = $realtime; phase = PH_GAP_B; #(w_ns + 200);
    for (int i = 0; i < 40; i++) begin
      real m;
      int  ta, tbh, g;
      if (i % 10 == 5) begin
        // Long A pulse: wait until all edge pulses are over, then switch.
        a = 1'b1; t_ar = $realtime; phase = PH_A; #(1000);
        ctrl = 4'(($urandom % 15) + 1);
        w_ns = expected_w(ctrl);
        n_code_change++;
        #(600);
        a = 1'b0; t_af = $realtime; phase = PH_GAP_A; #(w_ns + 100);
        b = 1'b1; t_br = $realtime; phase = PH_B;     #(w_ns + 600);
        b = 1'b0; t_bf = $realtime; phase = PH_GAP_B; #(w_ns + 100);
      end else begin
        m   = $sin(2.0 * 3.14159265 * real'(i) / 20.0);
        g   = 480 + 30;
        ta  = int'(real'(2500 - 2 * g) * (0.5 + 0.4 * m));
        tbh = (5000 - 2 * g) - ta;
        // Every pulse must outlast the delay (the generator's operating rule).
        if (ta < w_ns + 20) begin tbh -= (w_ns + 20 - ta); ta = w_ns + 20; end
        if (tbh < w_ns + 20) begin ta -= (w_ns + 20 - tbh); tbh = w_ns + 20; end
        pwm_cycle(ta, g, tbh, g);
      end
    end
    armed = 1'b0;

    // Every mechanism must have happened.
    foreach (n_level[i]) begin
      checks++;
      if (n_level[i] == 0) begin failures++; $display("level %0d never seen", i - 2); end
    end
    checks++;
    if (n_step_code0 == 0 || n_step_code15 == 0) begin
      failures++;
      $display("steps at code 0000: %0d, at 1111: %0d", n_step_code0, n_step_code15);
    end
    checks++;
    if (n_code_change == 0 || n_clear == 0) begin
      failures++;
      $display("code changes %0d, clears %0d", n_code_change, n_clear);
    end
    $display("levels -2..2 sampled: %0d %0d %0d %0d %0d; steps at 0000: %0d, at 1111: %0d; code changes: %0d; clears: %0d",
             n_level[0], n_level[1], n_level[2], n_level[3], n_level[4],
             n_step_code0, n_step_code15, n_code_change, n_clear);
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
