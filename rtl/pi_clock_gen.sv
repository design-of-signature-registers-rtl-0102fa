// Behavioural model of the phase-interpolator-based clock generator.
//
// This is a simulation model, not synthesizable logic: the real part is a
// mixed-signal macro (a four-phase generator, phase interpolators, a phase
// combiner and a controller) fed by a 1.5 GHz four-phase reference. The
// model keeps its interface, a reference clock in, a period control word in,
// a clock out, and its behaviour at that interface: once the reference has
// started, clk_out runs with the period given by dm_pkg::pi_period_ps(cnt),
// i.e. 1000 ps at cnt = 0, shorter by 5.2 ps per step of cnt, never below
// 500 ps. A change of cnt takes effect at the next half period. The
// reference is modelled as a single phase; jitter, duty-cycle and phase
// control functions of the real part are not modelled. The half period is
// never zero (at least 250 ps), although the linter cannot know that.
module pi_clock_gen
  import dm_pkg::*;
(
  input  logic                clk_ref,  // reference clock
  input  logic [PI_CNT_W-1:0] cnt,      // period control
  output logic                clk_out   // generated clock
);
  timeunit 1ps; timeprecision 100fs;

  logic    locked;
  realtime half_period;

  initial begin
    locked  = 1'b0;
    clk_out = 1'b0;
    @(posedge clk_ref);
    locked = 1'b1;
  end

  always begin
    wait (locked);
    half_period = pi_period_ps(cnt) / 2.0;
    #(half_period) clk_out = ~clk_out;
  end
endmodule
