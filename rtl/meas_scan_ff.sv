// Measurement scan flip-flop.
//
// A D flip-flop preceded by two 2:1 multiplexers. The first multiplexer,
// steered by se1, chooses between the scan input si (se1 = 1) and the test
// bit held in this flip-flop's extra latch (se1 = 0). The second multiplexer,
// steered by se0, chooses between the functional input d (se0 = 0) and the
// output of the first multiplexer (se0 = 1). So the cell has three modes:
//   se0 = 0            normal operation, q <= d
//   se0 = 1, se1 = 1   scan shift,       q <= si
//   se0 = 1, se1 = 0   vector load,      q <= latch_in
// The flip-flop output drives both the functional output q and the scan
// output so (the same node). Everything updates on the rising edge of clk.
//
// The multiplexer structure and the mode table follow the published cell.
// The asynchronous active-high reset rst is this design's choice: the chip
// has a reset line for its flip-flops that is separate from the one of the
// signature registers, but its polarity and timing are not specified.
module meas_scan_ff (
  input  logic clk,
  input  logic rst,       // asynchronous, active high
  input  logic d,         // functional data input
  input  logic si,        // scan input
  input  logic latch_in,  // stored test bit from the extra latch
  input  logic se0,       // 0: functional d, 1: scan or load
  input  logic se1,       // 1: scan si, 0: load latch_in (when se0 = 1)
  output logic q,         // functional output
  output logic so         // scan output (same node as q)
);
  timeunit 1ps; timeprecision 100fs;

  logic upper_mux;
  logic next_q;

  always_comb begin
    upper_mux = se1 ? si : latch_in;
    next_q    = se0 ? upper_mux : d;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= next_q;
  end

  assign so = q;
endmodule
