// Shared constants of the on-chip delay measurement system.
//
// The variable clock generator's figures are those of the phase-interpolator
// clock generator the scheme is built on: output clock from 1 GHz to 2 GHz
// (period 1000 ps down to 500 ps) in phase steps of 5.2 ps. A 7-bit control
// word covers the range: (1000 - 500) / 5.2 = 96.2 steps, so codes 0..96 are
// distinct periods and larger codes stay at the 500 ps limit.
package dm_pkg;
  timeunit 1ps; timeprecision 100fs;

  localparam real PI_MAX_PERIOD_PS = 1000.0;  // 1 GHz, cnt = 0
  localparam real PI_MIN_PERIOD_PS = 500.0;   // 2 GHz
  localparam real PI_STEP_PS       = 5.2;     // timing step resolution
  localparam int  PI_CNT_W         = 7;       // width of the period control

  // Output period of the clock generator for control word cnt, in ps.
  function automatic real pi_period_ps(input logic [PI_CNT_W-1:0] cnt);
    real p;
    p = PI_MAX_PERIOD_PS - PI_STEP_PS * real'(cnt);
    if (p < PI_MIN_PERIOD_PS) p = PI_MIN_PERIOD_PS;
    return p;
  endfunction
endpackage
