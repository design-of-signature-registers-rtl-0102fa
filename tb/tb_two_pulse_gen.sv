// Self-checking testbench of the two-pulse generator: with a free-running
// clock, every rising edge of the trigger must give exactly two output
// pulses, one clock period apart and each a full clock high phase, and
// nothing while the trigger stays high or low.
module tb_two_pulse_gen;
  timeunit 1ps; timeprecision 100fs;

  localparam realtime PERIOD = 800.0;
  logic clk = 1'b0, rst = 1'b0, trg = 1'b0, pulses;
  int checks = 0, failures = 0;
  int n_rise = 0;
  realtime rise_t [2];
  realtime fall_t;

  two_pulse_gen dut (.*);

  always #(PERIOD / 2) clk = ~clk;

  always @(posedge pulses) begin
    if (n_rise < 2) rise_t[n_rise] = $realtime;
    n_rise++;
  end
  always @(negedge pulses) fall_t = $realtime;

  initial #1 rst = 1'b1;  // a real edge for the asynchronous reset

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000; rst = 1'b0;
    for (int k = 0; k < 6; k++) begin
      #(PERIOD * 3.3);
      n_rise = 0;
      trg = 1'b1;
      #(PERIOD * (6 + k));
      checks++;
      if (n_rise != 2) begin
        failures++;
        $display("trigger %0d: %0d pulses", k, n_rise);
      end else begin
        checks++;
        if (rise_t[1] - rise_t[0] != PERIOD) failures++;
        checks++;
        if (fall_t - rise_t[1] != PERIOD / 2) failures++;
      end
      trg = 1'b0;
      n_rise = 0;
      #(PERIOD * 5);
      checks++;
      if (n_rise != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
