// Self-checking testbench of the measurement scan flip-flop: reset, then
// random inputs and mode lines for many clocks; after each rising edge the
// output is compared with the value the mode table predicts (normal: d,
// scan: si, load: latch), and so must always equal q.
module tb_meas_scan_ff;
  timeunit 1ps; timeprecision 100fs;

  logic clk = 1'b0, rst = 1'b0;
  logic d = 1'b0, si = 1'b0, latch_in = 1'b0, se0 = 1'b0, se1 = 1'b0;
  logic q, so;
  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};

  meas_scan_ff dut (.*);

  always #500 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    #50 rst = 1'b1;
    #50;
    checks++; if (q !== 1'b0) failures++;
    @(negedge clk); rst = 1'b0;
    repeat (400) begin
      {d, si, latch_in, se0, se1} = 5'($urandom);
      if (!se0)     begin expected = d;        n_mode[0]++; end
      else if (se1) begin expected = si;       n_mode[1]++; end
      else          begin expected = latch_in; n_mode[2]++; end
      @(posedge clk); #1;
      checks++;
      if (q !== expected || so !== q) begin
        failures++;
        $display("mismatch: se0=%b se1=%b d=%b si=%b latch=%b q=%b", se0, se1, d, si, latch_in, q);
      end
      @(negedge clk);
    end
    for (int m = 0; m < 3; m++) begin
      checks++; if (n_mode[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
