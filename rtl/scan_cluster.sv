// Cluster of measurement scan flip-flops.
//
// N measurement scan flip-flops (meas_scan_ff), each with its own extra
// test-vector latch (vector_latch), chained into one segment of the scan
// path: flip-flop 0 is the head and takes the cluster's scan input si,
// flip-flop j takes the output of flip-flop j-1, and the tail flip-flop N-1
// drives the cluster's scan output so. The tail output also feeds the
// cluster's signature register, so a response captured in flip-flop j
// reaches the signature register input after N-1-j shift clocks and is
// sampled by it on the (N-j)-th shift clock.
//
// Each latch stores the value of its own flip-flop while lck is high, and
// feeds it back to the flip-flop's latch input. All flip-flops share clk,
// the asynchronous reset and the mode lines se0/se1.
//
// The cluster structure, the chaining and the latch per flip-flop follow the
// published system; N = 3 is the cluster size of its worked examples.
module scan_cluster #(
  parameter int N = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         se0,
  input  logic         se1,
  input  logic         lck,
  input  logic         si,     // from the previous cluster's tail or the chip scan input
  input  logic [N-1:0] d,      // functional inputs, index = position in the cluster
  output logic [N-1:0] q,      // functional outputs
  output logic         so      // tail output: next cluster and signature register
);
  timeunit 1ps; timeprecision 100fs;

  logic [N-1:0] chain_in;
  logic [N-1:0] stored;
  logic [N-1:0] scan_out;

  if (N > 1) begin : g_chain
    assign chain_in = {scan_out[N-2:0], si};
  end else begin : g_single
    assign chain_in = si;
  end

  for (genvar j = 0; j < N; j++) begin : g_ff
    meas_scan_ff u_ff (
      .clk      (clk),
      .rst      (rst),
      .d        (d[j]),
      .si       (chain_in[j]),
      .latch_in (stored[j]),
      .se0      (se0),
      .se1      (se1),
      .q        (q[j]),
      .so       (scan_out[j])
    );
    vector_latch u_latch (
      .lck (lck),
      .d   (q[j]),
      .q   (stored[j])
    );
  end

  assign so = scan_out[N-1];
endmodule
