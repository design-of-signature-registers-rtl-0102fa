// On-chip delay measurement system with signature registers.
//
// The chip's N_FF flip-flops are measurement scan flip-flops, each with an
// extra latch that holds the test vector, grouped into M clusters of CL_SIZE
// flip-flops (the last cluster holds the remainder). The clusters form one
// scan chain sci -> cluster 0 -> ... -> cluster M-1 -> sco. The tail of each
// cluster also feeds that cluster's signature register, so the responses of
// paths ending in different clusters are compacted in parallel.
//
// To measure a path, the tester scans the test vector in, copies it into the
// latches (lck), and then repeats, with a test clock width shortened by one
// resolution step each time: reload the vector from the latches (se0 = 1,
// se1 = 0, one slow clock), fire a fast double pulse from the variable clock
// generator (cs = 1, trg rising, width set by cnt), and shift the responses
// towards the signature registers with slow clocks (se0 = se1 = 1) while the
// scj code tells, clock by clock, which register samples its input. After the
// repetitions the signatures are shifted out on sgo (sge = 0, sgs = 1) and
// looked up in a table of the signatures expected for each delay interval.
//
// Clocking: clk = cs ? double pulse : tck drives every flip-flop and
// signature register. The tester changes cs, se0/se1, scj and sge only while
// tck is low. The two resets clear the flip-flops (and the pulse generator)
// and the signature registers independently.
//
// The structure, the signal names and the tester interface follow the
// published measurement system. This design adds sgs, the shift line that
// clocks all signature registers together for read-out (the one-hot decoder
// cannot enable them all at once), and chains the signature registers with
// cluster 0's register first, its sgi tied to 0, and cluster M-1's sgo as
// the chip output. The functional inputs d and outputs q connect to the
// user's combinational logic, bit i*CL_SIZE + j being position j of
// cluster i. An assertion checks the tester rule that scj is 0 while the
// fast clock is selected.
module delay_meas_chip
  import dm_pkg::*;
#(
  parameter int N_FF      = 9,  // flip-flops in the chip
  parameter int CL_SIZE   = 3,  // flip-flops per cluster
  parameter int SCJ_BITS  = 2,  // decoder input lines
  parameter int SIG_WIDTH = 4,  // bits per signature register
  localparam int M        = (N_FF + CL_SIZE - 1) / CL_SIZE,  // clusters
  localparam int N_SCK    = (1 << SCJ_BITS) - 1
) (
  // tester interface
  input  logic                 tck,      // slow tester clock
  input  logic                 cs,       // 1: fast double pulse, 0: tck
  input  logic                 trg,      // VCG trigger
  input  logic [PI_CNT_W-1:0]  cnt,      // VCG test clock width control
  input  logic                 se0,      // scan flip-flop mode lines
  input  logic                 se1,
  input  logic                 lck,      // latch the test vector
  input  logic [SCJ_BITS-1:0]  scj,      // encoded capture enables
  input  logic                 sge,      // signature (1) / shift (0) configuration
  input  logic                 sgs,      // shift all signature registers (read-out)
  input  logic                 rst_ff,   // reset of the flip-flops
  input  logic                 rst_sig,  // reset of the signature registers
  input  logic                 sci,      // scan input
  output logic                 sco,      // scan output
  output logic                 sgo,      // signature read-out
  // variable clock generator reference
  input  logic                 clk_ref,
  // functional side, to and from the circuit under test
  input  logic [N_FF-1:0]      d,
  output logic [N_FF-1:0]      q
);
  timeunit 1ps; timeprecision 100fs;

  if (M > N_SCK) begin : g_param_check
    $error("delay_meas_chip: %0d clusters need more than %0d scj lines", M, SCJ_BITS);
  end

  logic           fast_clk;
  logic           clk;
  logic [N_SCK-1:0] sck;
  logic [M:0]     scan_link;   // scan chain between clusters
  logic [M-1:0]   tail;        // cluster tails, signature register inputs
  logic [M:0]     sig_link;    // read-out chain between signature registers

  vcg u_vcg (
    .clk_ref (clk_ref),
    .rst     (rst_ff),
    .trg     (trg),
    .cnt     (cnt),
    .pulses  (fast_clk)
  );

  assign clk = cs ? fast_clk : tck;

  // Tester rule: no signature register samples on the fast double pulse;
  // the responses are transferred afterwards with the slow clock.
  a_no_capture_at_speed: assert property (@(posedge clk) cs |-> scj == '0)
    else $error("delay_meas_chip: scj must be 0 while the fast clock is selected");

  bcd_decoder #(.L(SCJ_BITS)) u_dec (
    .scj (scj),
    .sck (sck)
  );

  assign scan_link[0] = sci;
  assign sig_link[0]  = 1'b0;

  for (genvar i = 0; i < M; i++) begin : g_cluster
    localparam int NI = (i == M - 1) ? N_FF - (M - 1) * CL_SIZE : CL_SIZE;

    scan_cluster #(.N(NI)) u_cl (
      .clk (clk),
      .rst (rst_ff),
      .se0 (se0),
      .se1 (se1),
      .lck (lck),
      .si  (scan_link[i]),
      .d   (d[i*CL_SIZE +: NI]),
      .q   (q[i*CL_SIZE +: NI]),
      .so  (scan_link[i+1])
    );
    assign tail[i] = scan_link[i+1];

    signature_register #(.WIDTH(SIG_WIDTH)) u_sig (
      .clk   (clk),
      .rst   (rst_sig),
      .sck   (sck[i]),
      .sge   (sge),
      .shift (sgs),
      .din   (tail[i]),
      .sgi   (sig_link[i]),
      .sgo   (sig_link[i+1]),
      .sig   ()
    );
  end

  assign sco = scan_link[M];
  assign sgo = sig_link[M];
endmodule
