// Extra test-vector latch.
//
// Every measurement scan flip-flop has one of these next to it. After the
// test vector has been shifted into the scan chain, a pulse on lck copies
// each flip-flop's value into its latch. The latch then holds the vector so
// that it can be reloaded into the flip-flops in a single clock (load mode of
// the scan flip-flop) before every repetition of a test, instead of repeating
// the slow scan-in.
//
// It is a level-sensitive latch: transparent while lck = 1, holding while
// lck = 0. The latch is intended; it is the storage element the scheme asks
// for. Whether the part is a true latch or an edge-triggered register is not
// specified; a level latch matches the name used for it and costs less. It
// has no reset: it is always written by lck before it is read. When the
// latch is linted inside a cluster, where its input is the flip-flop it
// stores, the linter reports that it found no latch; the storage is real
// (the latch holds while lck is low, which the tests check).
module vector_latch (
  input  logic lck,  // latch enable, transparent while high
  input  logic d,    // value of the associated flip-flop
  output logic q     // stored test bit
);
  timeunit 1ps; timeprecision 100fs;

  always_latch
    if (lck) q = d;
endmodule
