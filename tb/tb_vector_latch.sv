// Self-checking testbench of the test-vector latch: transparent while lck is
// high (output follows input), holding while lck is low (input changes do
// not reach the output).
module tb_vector_latch;
  timeunit 1ps; timeprecision 100fs;

  logic lck = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;

  vector_latch dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    repeat (100) begin
      lck = 1'b1;
      d = 1'($urandom); #10;
      checks++; if (q !== d) failures++;
      d = ~d; #10;
      checks++; if (q !== d) failures++;
      held = d;
      lck = 1'b0; #10;
      repeat (3) begin
        d = 1'($urandom); #10;
        checks++; if (q !== held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
