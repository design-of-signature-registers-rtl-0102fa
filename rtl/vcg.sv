// Variable clock generator (VCG).
//
// Produces the fast double pulse used for at-speed testing: the
// phase-interpolator clock generator runs at the period selected by cnt, and
// the two-pulse generator passes two of its pulses to pulses after each
// rising edge of trg. The distance between the two rising edges, the test
// clock width, is therefore the generator period: 1000 ps minus 5.2 ps per
// step of cnt. Lowering the width by one resolution step between repeated
// tests of a path is done by raising cnt.
//
// Composition and interface (trg, cnt in, double pulse out) follow the
// published measurement system. The clock generator inside is a behavioural
// model; the two-pulse generator is synthesizable.
module vcg
  import dm_pkg::*;
(
  input  logic                clk_ref,  // reference clock of the generator
  input  logic                rst,      // asynchronous, active high
  input  logic                trg,      // launch a double pulse on its rising edge
  input  logic [PI_CNT_W-1:0] cnt,      // test clock width control
  output logic                pulses    // the double pulse
);
  timeunit 1ps; timeprecision 100fs;

  logic var_clk;

  pi_clock_gen u_pi (
    .clk_ref (clk_ref),
    .cnt     (cnt),
    .clk_out (var_clk)
  );

  two_pulse_gen u_2p (
    .clk    (var_clk),
    .rst    (rst),
    .trg    (trg),
    .pulses (pulses)
  );
endmodule
