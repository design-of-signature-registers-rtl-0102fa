// Self-checking testbench of the capture-enable decoder. The 2-line decoder
// is checked against the slice transformation table of the three-cluster
// example (scj0 scj1 = 00, 10, 01, 11 -> sck0..2 = 000, 100, 010, 001); a
// 3-line instance is checked exhaustively for the one-hot rule.
module tb_bcd_decoder;
  timeunit 1ps; timeprecision 100fs;

  logic [1:0] scj2;
  logic [2:0] sck2;
  logic [2:0] scj3;
  logic [6:0] sck3;
  int checks = 0, failures = 0;

  bcd_decoder                dut2 (.scj(scj2), .sck(sck2));
  bcd_decoder #(.L(3))       dut3 (.scj(scj3), .sck(sck3));

  // table rows: {scj0, scj1} and {sck0, sck1, sck2}
  localparam logic [1:0] TAB_SCJ [4] = '{2'b00, 2'b10, 2'b01, 2'b11};
  localparam logic [2:0] TAB_SCK [4] = '{3'b000, 3'b100, 3'b010, 3'b001};

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      scj2[0] = TAB_SCJ[r][1];
      scj2[1] = TAB_SCJ[r][0];
      #10;
      checks++;
      if ({sck2[0], sck2[1], sck2[2]} !== TAB_SCK[r]) begin
        failures++;
        $display("row %0d: sck0..2 = %b%b%b", r, sck2[0], sck2[1], sck2[2]);
      end
    end
    for (int c = 0; c < 8; c++) begin
      scj3 = 3'(c); #10;
      checks++;
      if (c == 0) begin
        if (sck3 !== 7'd0) failures++;
      end else if (sck3 !== 7'(1 << (c - 1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
