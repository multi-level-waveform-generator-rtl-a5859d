// toggle_dff: a D flip-flop whose D input is fed from its own inverted
// output, so Q changes state on every rising edge of clk.  An
// asynchronous clear, active while en is low, holds Q at 0.  It is the storage element of
// cd_generator, which uses eight of them, each clocked by one edge-detector
// pulse or its inverse.
//
// Interface: clk (toggle clock), en (active-high enable, clears when 0), q.
// Timing: q changes on the rising edge of clk; en = 0 forces q = 0 at once.
`timescale 1ns / 1ps
module toggle_dff (
  input  logic clk,  // toggle clock
  input  logic en,   // enable; 0 clears the flip-flop asynchronously
  output logic q
);

  logic d;

  assign d = ~q;  // D fed from Q-bar

  always_ff @(posedge clk or negedge en) begin
    if (!en) q <= 1'b0;
    else     q <= d;
  end

endmodule
