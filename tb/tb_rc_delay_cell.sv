// tb_rc_delay_cell: checks the delay of the behavioural delay-cell model
// for all sixteen codes.  For each code it makes a rising and a falling
// input edge and measures when the output follows.  The expected delay is
// 30 ns plus 45 ns for each R*C unit switched in, where the capacitor on
// ladder node k (CTRL[k]) counts k units.  It also checks that 0000 gives
// the shortest delay, 1111 the longest (480 ns), that a pulse shorter
// than the delay is absorbed and that a longer one comes out whole.
`timescale 1ns / 1ps
module tb_rc_delay_cell;

  logic       vin;
  logic [4:1] ctrl;
  logic       vout;

  rc_delay_cell dut (.vin(vin), .ctrl(ctrl), .vout(vout));

  int checks = 0, failures = 0;
  realtime t0, d_min, d_max;
  int      n_out = 0;
  logic    count_out = 1'b0;
  always @(vout) if (count_out) n_out++;

  function automatic int expected_ns(input logic [4:1] code);
    int units;
    units = 0;
    for (int k = 1; k <= 4; k++) if (code[k]) units += k;
    return 30 + 45 * units;
  endfunction

  task automatic check_edge(input logic level, input int exp_ns);
    realtime dt;
    vin = level;
    t0  = $realtime;
    @(vout);
    dt = $realtime - t0;
    checks++;
    if (vout !== level || dt != real'(exp_ns)) begin
      failures++;
      $display("code %b: edge to %b took %0.3f ns, expected %0d ns", ctrl, level, dt, exp_ns);
    end
    if (dt < d_min) d_min = dt;
    if (dt > d_max) d_max = dt;
  endtask

  initial begin
    vin = 1'b0; ctrl = 4'b0000; d_min = 1e9; d_max = 0;
    #1000;
    for (int code = 0; code < 16; code++) begin
      ctrl = 4'(code);
      #10;
      check_edge(1'b1, expected_ns(4'(code)));
      #600;
      check_edge(1'b0, expected_ns(4'(code)));
      #600;
    end
    // Extremes.
    checks++;
    if (d_min != 30.0 || d_max != 480.0) begin
      failures++;
      $display("delay range %0.3f..%0.3f ns, expected 30..480 ns", d_min, d_max);
    end
    // Inertial delay at 480 ns: a 100 ns pulse is absorbed, a 500 ns pulse
    // comes out whole, 480 ns late.
    ctrl = 4'b1111;
    #10;
    count_out = 1'b1;
    vin = 1'b1; #100; vin = 1'b0;
    #1000;
    checks++;
    if (n_out != 0) begin failures++; $display("short pulse passed"); end
    vin = 1'b1; t0 = $realtime;
    @(posedge vout);
    checks++;
    if ($realtime - t0 != 480.0) begin failures++; $display("pulse rise at %0.3f ns", $realtime - t0); end
    #20;
    vin = 1'b0;
    @(negedge vout);
    checks++;
    if ($realtime - t0 != 980.0) begin failures++; $display("pulse fall at %0.3f ns", $realtime - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
