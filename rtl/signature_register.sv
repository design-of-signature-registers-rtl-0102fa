// Reconfigurable signature register.
//
// A WIDTH-bit linear feedback shift register that compacts the stream of
// test responses arriving at din, one bit per enabled clock. Stage 0 takes
// the input, stage i takes stage i-1, and the last stage is fed back into the
// stages marked in TAPS. With the default TAPS (stages 0 and 1) this is the
// characteristic polynomial x^WIDTH + x + 1: for WIDTH = 3 it reproduces the
// published signature table of a five-step measurement (for instance the
// rising-transition sequence P F F F F, bits 1 0 0 0 0, gives 011), and for
// WIDTH = 4 it is the four-bit register of the published structure, whose
// feedback enters stages 0 and 1.
//
// Modes, all on the rising edge of clk:
//   shift = 1                 read-out: a plain shift register, stage 0 <= sgi.
//                             Registers of different clusters are chained
//                             sgo -> sgi into one long read-out register.
//   shift = 0, sck = 1, sge=1 signature mode: compact din with feedback
//   shift = 0, sck = 1, sge=0 tracing mode: feedback cut, din shifts in raw
//   shift = 0, sck = 0        hold (the register does not capture)
// sgo is the last stage while sge = 0 and 0 while sge = 1.
//
// sck acts as a clock enable here; the published structure gates the clock
// with sck, which has the same effect when sck changes only while clk is
// low. The shift line is this design's own addition: the capture enables of
// all registers come from a one-hot decoder and so can never all be 1 at the
// same time, yet read-out needs every register of the chain to shift
// together, and it must not mix the cluster responses into the data being
// shifted. Reset (rst, asynchronous, active high) clears the register; the
// signature registers have a reset line of their own.
module signature_register #(
  parameter int               WIDTH = 4,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(3)  // stages receiving feedback
) (
  input  logic             clk,
  input  logic             rst,    // asynchronous, active high
  input  logic             sck,    // capture enable for din
  input  logic             sge,    // 1: signature (feedback on), 0: shift register
  input  logic             shift,  // read-out shift of the whole chain
  input  logic             din,    // test response (tail of the cluster)
  input  logic             sgi,    // read-out chain input
  output logic             sgo,    // read-out chain output
  output logic [WIDTH-1:0] sig     // register contents, stage 0 in bit 0
);
  timeunit 1ps; timeprecision 100fs;

  logic             feedback;
  logic [WIDTH-1:0] compact_next;
  logic [WIDTH-1:0] shift_next;

  always_comb begin
    feedback     = sge & sig[WIDTH-1];
    compact_next = {sig[WIDTH-2:0], din} ^ (TAPS & {WIDTH{feedback}});
    shift_next   = {sig[WIDTH-2:0], sgi};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        sig <= '0;
    else if (shift) sig <= shift_next;
    else if (sck)   sig <= compact_next;
  end

  assign sgo = sig[WIDTH-1] & ~sge;
endmodule
