// Self-checking testbench of a scan cluster (three flip-flops with latches):
// scan a vector in and check it on q, store it in the latches, overwrite the
// flip-flops by scanning other data, reload the vector in one clock from the
// latches, capture functional data, and shift out on so, checking every bit.
module tb_scan_cluster;
  timeunit 1ps; timeprecision 100fs;

  localparam int N = 3;
  logic clk = 1'b0, rst = 1'b0, se0 = 1'b1, se1 = 1'b1, lck = 1'b0, si = 1'b0;
  logic [N-1:0] d = '0, q;
  logic so;
  int checks = 0, failures = 0;

  scan_cluster #(.N(N)) dut (.*);

  task automatic tick();
    #500 clk = 1'b1; #500 clk = 1'b0;
  endtask

  initial #1 rst = 1'b1;  // a real edge for the asynchronous reset

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] vec, other, got;
    #100; rst = 1'b0;
    repeat (20) begin
      vec = N'($urandom); other = ~vec;
      // scan in: the bit for the tail goes first
      se0 = 1'b1; se1 = 1'b1;
      for (int j = N - 1; j >= 0; j--) begin si = vec[j]; tick(); end
      checks++; if (q !== vec) failures++;
      // store in the latches
      lck = 1'b1; #100; lck = 1'b0; #100;
      // overwrite the flip-flops
      for (int j = N - 1; j >= 0; j--) begin si = other[j]; tick(); end
      checks++; if (q !== other) failures++;
      // reload from the latches
      se1 = 1'b0; tick();
      checks++; if (q !== vec) failures++;
      // functional capture
      se0 = 1'b0; d = N'($urandom); tick();
      checks++; if (q !== d) failures++;
      // scan out: tail first
      se0 = 1'b1; se1 = 1'b1; si = 1'b0;
      for (int t = 0; t < N; t++) begin got[N-1-t] = so; tick(); end
      checks++; if (got !== d) failures++;
    end
    rst = 1'b1; #10;
    checks++; if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
