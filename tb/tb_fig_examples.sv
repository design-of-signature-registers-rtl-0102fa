// Worked-example testbench: the two-cluster measurement of six flip-flops.
//
// The chip is built with six flip-flops in two clusters of three and 3-bit
// signature registers. The test vector is (FF0..FF5) = (0,0,1,0,1,1); the
// paths ending in FF1, FF2, FF3 and FF5 are sensitized. Stage 0 measures the
// paths into FF1 (cluster 0) and FF5 (cluster 1) in parallel, stage 1 those
// into FF2 and FF3. Each stage runs five tests with the test clock width
// shortened by one step (52 ps) per test.
//
// Checked against numbers stated for this example:
//   - the capture sequences seen on sck0/sck1 during the shift clocks:
//     stage 0 "01" and "10" (two shift clocks), stage 1 "100" and "001"
//     (three shift clocks), bit 0 being the first shift clock;
//   - each retrieved 3-bit signature against the five-test signature table
//     (rising P = 1 column or falling P = 0 column, written stage 0 first),
//     which must name the delay case the modelled path delay lies in.
// The circuit under test is modelled as in the end-to-end testbench: each
// flip-flop's input is its own inverted output after a path delay.
module tb_fig_examples;
  timeunit 1ps; timeprecision 100fs;

  localparam int N_FF = 6, CL = 3, M = 2, N_MEAS = 5;
  localparam realtime TCK_HALF = 5000.0;
  localparam realtime DELAY [N_FF] = '{500.0, 920.0, 700.0, 850.0, 500.0, 1010.0};
  localparam logic [N_FF-1:0] VEC = 6'b110100;   // FF5..FF0
  localparam int STAGE_POS [2][M] = '{'{1, 2}, '{2, 0}};
  localparam string SCK_SEQ [2][M] = '{'{"01", "10"}, '{"100", "001"}};
  localparam string SIG_R [6] = '{"000", "011", "101", "100", "110", "010"};
  localparam string SIG_F [6] = '{"010", "001", "111", "110", "100", "000"};

  logic tck = 1'b0, cs = 1'b0, trg = 1'b0, se0 = 1'b1, se1 = 1'b1, lck = 1'b0;
  logic [6:0] cnt = '0;
  logic [1:0] scj = '0;
  logic sge = 1'b1, sgs = 1'b0, rst_ff = 1'b0, rst_sig = 1'b0, sci = 1'b0;
  logic sco, sgo, clk_ref = 1'b0;
  logic [N_FF-1:0] d, q;
  int checks = 0, failures = 0;
  string seen [M];

  delay_meas_chip #(.N_FF(6), .CL_SIZE(3), .SCJ_BITS(2), .SIG_WIDTH(3)) dut (.*);

  always #333.3 clk_ref = ~clk_ref;

  for (genvar k = 0; k < N_FF; k++) begin : g_cut
    assign #(DELAY[k]) d[k] = ~q[k];
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic realtime width_ps(input int c);
    return 1000.0 - 5.2 * c;
  endfunction

  task automatic tck_pulse();
    #(TCK_HALF) tck = 1'b1;
    #(TCK_HALF) tck = 1'b0;
  endtask

  initial begin
    logic [2:0] sigs [M];
    for (int r = 0; r < 2; r++) begin
      #100 rst_ff = 1'b1;
      #100 rst_ff = 1'b0;
    end
    // scan in (tail bit first) and store in the latches
    se0 = 1'b1; se1 = 1'b1;
    for (int k = N_FF - 1; k >= 0; k--) begin sci = VEC[k]; tck_pulse(); end
    checks++; if (q !== VEC) failures++;
    #1000 lck = 1'b1;
    #1000 lck = 1'b0;

    for (int s = 0; s < 2; s++) begin
      automatic int shifts = 0;
      automatic logic [1:0] code [CL+1];
      foreach (code[t]) code[t] = '0;
      for (int i = 0; i < M; i++) begin
        automatic int clocks = CL - STAGE_POS[s][i];
        if (clocks > shifts) shifts = clocks;
        code[clocks] = 2'(i + 1);
      end
      #100 rst_sig = 1'b1;
      #100 rst_sig = 1'b0;
      sge = 1'b1;
      for (int t = 0; t < N_MEAS; t++) begin
        // reload the vector from the latches
        se0 = 1'b1; se1 = 1'b0; tck_pulse();
        // double pulse
        cnt = 7'(10 * t); se0 = 1'b0;
        #2000 cs = 1'b1;
        #2000 trg = 1'b1;
        #6000 trg = 1'b0;
        #4000 cs = 1'b0;
        // transfer, recording the capture sequences
        se0 = 1'b1; se1 = 1'b1;
        foreach (seen[i]) seen[i] = "";
        for (int c = 1; c <= shifts; c++) begin
          scj = code[c];
          #1;
          foreach (seen[i]) seen[i] = {seen[i], dut.sck[i] ? "1" : "0"};
          tck_pulse();
        end
        scj = '0;
        for (int i = 0; i < M; i++) begin
          checks++;
          if (seen[i] != SCK_SEQ[s][i]) begin
            failures++;
            $display("stage %0d sck%0d sequence %s, expected %s", s, i, seen[i], SCK_SEQ[s][i]);
          end
        end
      end
      // read-out: SIG1 first, most significant stage first
      sge = 1'b0; sgs = 1'b1;
      #100;
      for (int i = M - 1; i >= 0; i--)
        for (int b = 2; b >= 0; b--) begin sigs[i][b] = sgo; tck_pulse(); end
      sgs = 1'b0; sge = 1'b1;
      for (int i = 0; i < M; i++) begin
        automatic int k = i * CL + STAGE_POS[s][i];
        automatic int truth = 0;
        automatic string got = "";
        for (int b = 0; b < 3; b++) got = {got, sigs[i][b] ? "1" : "0"};
        for (int t = 0; t < N_MEAS; t++) if (DELAY[k] < width_ps(10 * t)) truth = t + 1;
        checks++;
        if (got != (VEC[k] ? SIG_R[truth] : SIG_F[truth])) begin
          failures++;
          $display("FF%0d: signature %s, table case %0d gives %s", k, got, truth,
                   VEC[k] ? SIG_R[truth] : SIG_F[truth]);
        end else
          $display("FF%0d (%s): signature %s = case %0d, delay %0.0f ps", k,
                   VEC[k] ? "rising" : "falling", got, truth, DELAY[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
