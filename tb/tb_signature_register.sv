// Self-checking testbench of the reconfigurable signature register.
//
// A 3-bit instance is fed the five pass/fail responses of every case of the
// published five-step measurement example and must end with the signature
// printed in its table, for rising (P = 1) and falling (P = 0) transitions.
// The default 4-bit instance is checked against an independent bit-serial
// model of x^4 + x + 1 under random capture enables, then for hold
// (sck = 0), tracing mode (sge = 0: raw responses, no feedback), the gating
// of sgo, and chained read-out through sgi/sgo with the shift line.
module tb_signature_register;
  timeunit 1ps; timeprecision 100fs;

  logic clk = 1'b0, rst = 1'b0;
  logic sck = 1'b0, sge = 1'b1, shift = 1'b0, din = 1'b0, sgi = 1'b0;
  logic sgo3, sgo4, sgo4b;
  logic [2:0] sig3;
  logic [3:0] sig4, sig4b;
  int checks = 0, failures = 0;

  signature_register #(.WIDTH(3)) dut3 (
    .clk, .rst, .sck, .sge, .shift, .din, .sgi, .sgo(sgo3), .sig(sig3));
  signature_register dut4 (
    .clk, .rst, .sck, .sge, .shift, .din, .sgi, .sgo(sgo4), .sig(sig4));
  // second 4-bit register chained behind dut4 for read-out
  signature_register dut4b (
    .clk, .rst, .sck(1'b0), .sge, .shift, .din(1'b0), .sgi(sgo4), .sgo(sgo4b), .sig(sig4b));

  always #500 clk = ~clk;

  // Published table: case k passes the first k of five tests.
  // Signatures written as stage0 stage1 stage2.
  localparam string SIG_R [6] = '{"000", "011", "101", "100", "110", "010"};
  localparam string SIG_F [6] = '{"010", "001", "111", "110", "100", "000"};

  function automatic string bits3(input logic [2:0] s);
    string r = "";
    for (int i = 0; i < 3; i++) r = {r, s[i] ? "1" : "0"};
    return r;
  endfunction

  // independent model: one step of a Galois LFSR x^4 + x + 1 with input
  function automatic logic [3:0] ref_step(input logic [3:0] s, input logic b);
    logic msb;
    msb = s[3];
    return {s[2], s[1], s[0] ^ msb, b ^ msb};
  endfunction

  task automatic clear();
    @(negedge clk); rst = 1'b1; #10; rst = 1'b0;
  endtask

  task automatic feed(input logic b);
    @(negedge clk); din = b; sck = 1'b1;
    @(negedge clk); sck = 1'b0;
  endtask

  initial #1 rst = 1'b1;  // a real edge for the asynchronous reset

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] model;
    logic [3:0] pattern;
    logic [7:0] readout;
    #100; rst = 1'b0;

    // published signature table (3-bit register)
    for (int dir = 0; dir < 2; dir++) begin
      for (int k = 0; k < 6; k++) begin
        clear();
        sge = 1'b1;
        for (int t = 0; t < 5; t++) begin
          logic pass;
          pass = (t < k);
          feed(dir == 0 ? pass : ~pass);
        end
        checks++;
        if (bits3(sig3) != (dir == 0 ? SIG_R[k] : SIG_F[k])) begin
          failures++;
          $display("case %0d dir %0d: signature %s", k, dir, bits3(sig3));
        end
      end
    end

    // random stream against the model, with holds
    clear();
    model = '0;
    repeat (300) begin
      logic en, b;
      en = 1'($urandom); b = 1'($urandom);
      @(negedge clk); din = b; sck = en;
      @(posedge clk); #1;
      if (en) model = ref_step(model, b);
      checks++;
      if (sig4 !== model) failures++;
      checks++;
      if (sgo4 !== 1'b0) failures++;   // gated while sge = 1
    end
    @(negedge clk); sck = 1'b0;

    // tracing mode: raw pattern, no feedback
    clear();
    sge = 1'b0;
    pattern = 4'b1011;
    for (int t = 3; t >= 0; t--) feed(pattern[t]);
    checks++;
    if (sig4 !== pattern) begin
      failures++;
      $display("tracing: got %b", sig4);
    end
    checks++;
    if (sgo4 !== pattern[3]) failures++;

    // read-out: dut4 holds 1011, dut4b is cleared; shift 8 clocks
    @(negedge clk); rst = 1'b0;
    @(negedge clk); shift = 1'b1; sgi = 1'b0;
    for (int t = 0; t < 8; t++) begin
      readout[7 - t] = sgo4b;
      @(negedge clk);
    end
    shift = 1'b0;
    // first four bits out are dut4b (cleared), then pattern MSB first
    checks++;
    if (readout !== {4'b0000, 4'b1011}) begin
      failures++;
      $display("readout %b", readout);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
