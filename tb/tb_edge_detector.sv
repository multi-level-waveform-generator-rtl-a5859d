// tb_edge_detector: checks the edge detector's rising- and falling-edge
// pulses.  The input is toggled with random high and low times (all longer
// than the delay) for several codes; every nanosecond, half-way between
// stimulus edges, vout_pe must be high exactly during the first W ns after
// a rising edge and vout_ne during the first W ns after a falling edge,
// with W = 30 ns + 45 ns * (1*CTRL[1] + 2*CTRL[2] + 3*CTRL[3] + 4*CTRL[4]).
// The length of every pulse is measured as well.
`timescale 1ns / 1ps
module tb_edge_detector;

  logic       vin;
  logic [4:1] ctrl;
  logic       pe, ne;

  edge_detector dut (.vin(vin), .ctrl(ctrl), .vout_pe(pe), .vout_ne(ne));

  int checks = 0, failures = 0;
  int w_ns;
  logic armed;
  realtime t_edge, t_pe, t_ne;
  int n_pe = 0, n_ne = 0;

  function automatic int expected_w(input logic [4:1] code);
    int units;
    units = 0;
    if (code[1]) units += 1;
    if (code[2]) units += 2;
    if (code[3]) units += 3;
    if (code[4]) units += 4;
    return 30 + 45 * units;
  endfunction

  initial begin
    #0.5;
    forever begin
      if (armed) begin
        logic in_window, e_pe, e_ne;
        in_window = ($realtime - t_edge) < real'(w_ns);
        e_pe = vin & in_window;
        e_ne = ~vin & in_window;
        checks++;
        if (pe !== e_pe || ne !== e_ne) begin
          failures++;
          if (failures < 10)
            $display("t=%0.1f code=%b vin=%b pe=%b ne=%b exp %b %b",
                     $realtime, ctrl, vin, pe, ne, e_pe, e_ne);
        end
      end
      #1;
    end
  end

  always @(posedge pe) t_pe = $realtime;
  always @(posedge ne) t_ne = $realtime;
  always @(negedge pe) if (armed) begin
    n_pe++; checks++;
    if ($realtime - t_pe != real'(w_ns)) failures++;
  end
  always @(negedge ne) if (armed) begin
    n_ne++; checks++;
    if ($realtime - t_ne != real'(w_ns)) failures++;
  end

  initial begin
    vin = 1'b0; ctrl = 4'b0000; armed = 1'b0; w_ns = 30; t_edge = 0;
    t_pe = 0; t_ne = 0;
    #1000;
    for (int code = 0; code < 16; code++) begin
      armed = 1'b0;
      ctrl = 4'(code);
      w_ns = expected_w(4'(code));
      #600;
      armed = 1'b1;
      repeat (4) begin
        vin = ~vin;
        t_edge = $realtime;
        #(w_ns + 1 + ($urandom % 700));
      end
    end
    checks++;
    if (n_pe != 32 || n_ne != 32) begin
      failures++;
      $display("pulse counts pe=%0d ne=%0d, expected 32 each", n_pe, n_ne);
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
