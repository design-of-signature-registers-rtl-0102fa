// Capture-enable decoder ("BCD decoder").
//
// Reduces the tester channels needed to steer the capture of the M
// signature registers. On each shift clock at most one signature register
// has to capture (the code words are the slices of the per-register capture
// sequences), so the tester sends the index of that register in binary on
// L lines and this decoder expands it into the one-hot enables sck:
//   scj = 0        no register captures
//   scj = k + 1    sck[k] = 1, all others 0 (k = 0 .. M-1)
// scj[0] is the least significant bit. M = 2^L - 1 registers are served.
// With L = 2 this is the published slice transformation table:
// sck0..2 = 000, 100, 010, 001 for scj0 scj1 = 00, 10, 01, 11.
//
// Purely combinational. The tester changes scj while the clock is low, so
// the enables are stable at the next rising edge.
module bcd_decoder #(
  parameter int L = 2,
  localparam int M = (1 << L) - 1
) (
  input  logic [L-1:0] scj,  // binary code, 0 = none
  output logic [M-1:0] sck   // one-hot capture enables
);
  timeunit 1ps; timeprecision 100fs;

  always_comb begin
    sck = '0;
    for (int k = 0; k < M; k++)
      if (scj == L'(k + 1)) sck[k] = 1'b1;
  end
endmodule
