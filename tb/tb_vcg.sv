// Self-checking testbench of the variable clock generator: for a series of
// control words, a rising trigger must give exactly two pulses whose rising
// edges are 1000 ps - 5.2 ps * cnt apart (the test clock width).
module tb_vcg;
  timeunit 1ps; timeprecision 100fs;

  logic clk_ref = 1'b0, rst = 1'b0, trg = 1'b0;
  logic [6:0] cnt = '0;
  logic pulses;
  int checks = 0, failures = 0;
  int n_rise = 0;
  realtime rise_t [2];

  vcg dut (.*);

  always #333.3 clk_ref = ~clk_ref;

  always @(posedge pulses) begin
    if (n_rise < 2) rise_t[n_rise] = $realtime;
    n_rise++;
  end

  initial #1 rst = 1'b1;  // a real edge for the asynchronous reset

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime width;
    #2000; rst = 1'b0;
    for (int c = 0; c <= 60; c += 10) begin
      cnt = 7'(c);
      #3000;
      n_rise = 0;
      trg = 1'b1;
      #8000;
      width = 1000.0 - 5.2 * c;
      checks++;
      if (n_rise != 2) failures++;
      checks++;
      if (rise_t[1] - rise_t[0] < width - 0.2 || rise_t[1] - rise_t[0] > width + 0.2) begin
        failures++;
        $display("cnt %0d: width %0.1f ps", c, rise_t[1] - rise_t[0]);
      end
      trg = 1'b0;
      #4000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
