// Self-checking testbench of the clock generator model: no output before
// the reference starts; then, for several control words, the measured
// output period must be 1000 ps - 5.2 ps * cnt, limited to 500 ps.
module tb_pi_clock_gen;
  timeunit 1ps; timeprecision 100fs;

  logic clk_ref = 1'b0;
  logic [6:0] cnt = '0;
  logic clk_out;
  int checks = 0, failures = 0;
  realtime t0, t1;

  pi_clock_gen dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes [5] = '{0, 1, 10, 96, 127};
    realtime expect_p;
    #5000;
    checks++; if (clk_out !== 1'b0) failures++;
    fork
      forever #333.3 clk_ref = ~clk_ref;
    join_none
    foreach (codes[i]) begin
      cnt = 7'(codes[i]);
      expect_p = 1000.0 - 5.2 * codes[i];
      if (expect_p < 500.0) expect_p = 500.0;
      repeat (3) @(posedge clk_out);
      t0 = $realtime;
      @(posedge clk_out);
      t1 = $realtime;
      checks++;
      if (t1 - t0 < expect_p - 0.2 || t1 - t0 > expect_p + 0.2) begin
        failures++;
        $display("cnt %0d: period %0.1f ps, expected %0.1f", codes[i], t1 - t0, expect_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
