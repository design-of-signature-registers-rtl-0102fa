// Two-pulse generator.
//
// Lets exactly two pulses of the variable-frequency clock clk through to
// pulses after each rising edge of the trigger trg. The first pulse launches
// a transition into the paths under test, the second captures it, so the
// launch-to-capture time is one period of clk.
//
// A chain of three flip-flops samples trg. The window is open while the first
// stage is 1 and the third stage is still 0, which after a rising edge of trg
// lasts exactly two clock periods; the window gates clk. trg must stay high
// for at least three clock periods (the tester's trigger is far slower than
// clk), and a new double pulse needs trg to fall and rise again.
//
// Timing: the flip-flops change on the falling edge of clk, so the window
// opens and closes while clk is low and the gated output carries two whole,
// glitch-free high phases. The three-stage chain and the window taken between
// the first and the third stage follow the published generator; the choice of
// the falling edge is this design's, made for clean pulses. The asynchronous
// active-high reset rst clears the chain.
module two_pulse_gen (
  input  logic clk,     // variable-frequency clock
  input  logic rst,     // asynchronous, active high
  input  logic trg,     // trigger, asynchronous to clk
  output logic pulses   // two pulses of clk per rising edge of trg
);
  timeunit 1ps; timeprecision 100fs;

  logic [2:0] stage;
  logic       window;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) stage <= '0;
    else     stage <= {stage[1:0], trg};
  end

  assign window = stage[0] & ~stage[2];
  assign pulses = clk & window;
endmodule
