// End-to-end testbench of the delay measurement chip at its default size
// (nine flip-flops in three clusters of three, three 4-bit signature
// registers, 2-line capture decoder).
//
// The circuit under test is modelled here: every flip-flop input is the
// inverted output of the same flip-flop, delayed by a path delay chosen per
// flip-flop. A double pulse then launches a transition at the first edge and
// captures it at the second; the capture passes if the path delay is below
// the test clock width. The testbench acts as the tester:
//   1. scan the test vector in, store it in the latches, check the latches
//      by reloading and scanning out on sco, and scan it in again;
//   2. two measurement stages, each measuring one path per cluster in
//      parallel: five tests with the test clock width shortened by 52 ps
//      (10 generator steps) each time, every test being vector reload,
//      double pulse, and three shift clocks during which the scj code lets
//      each signature register sample its path's response;
//   3. read the signatures out on sgo and look each one up in the table of
//      signatures expected for "passes the first k tests", k = 0..5, which
//      gives the delay interval; it must be the one the path delay lies in;
//   4. one tracing run (sge = 0) with a non-monotonic width sequence, whose
//      raw pass/fail pattern is read out.
// Each response, the width of every double pulse, every signature and every
// traced pattern is compared with values computed here from the path delays.
module tb_delay_meas_chip;
  timeunit 1ps; timeprecision 100fs;

  localparam int N_FF = 9, CL = 3, M = 3, W = 4, N_MEAS = 5;
  localparam realtime TCK_HALF = 5000.0;

  // path delays in ps, index = cluster * 3 + position
  localparam realtime DELAY [N_FF] = '{500.0, 920.0, 700.0, 970.0, 500.0, 1010.0, 800.0, 850.0, 500.0};
  // test vector: 1 = rising transition measured, 0 = falling
  localparam logic [N_FF-1:0] VEC = 9'b0_0100_1010;
  // flip-flop measured in each cluster, per stage (position in the cluster)
  localparam int STAGE_POS [2][M] = '{'{1, 2, 0}, '{2, 0, 1}};

  logic tck = 1'b0, cs = 1'b0, trg = 1'b0, se0 = 1'b1, se1 = 1'b1, lck = 1'b0;
  logic [6:0] cnt = '0;
  logic [1:0] scj = '0;
  logic sge = 1'b1, sgs = 1'b0, rst_ff = 1'b0, rst_sig = 1'b0, sci = 1'b0;
  logic sco, sgo, clk_ref = 1'b0;
  logic [N_FF-1:0] d, q;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_scan_in = 0, n_latch_store = 0, n_latch_check = 0, n_reload = 0;
  int n_double_pulse = 0, n_pass = 0, n_fail = 0, n_readout = 0, n_trace = 0;
  int n_sck [M] = '{0, 0, 0};
  int n_rise_meas = 0, n_fall_meas = 0;

  delay_meas_chip dut (.*);

  always #333.3 clk_ref = ~clk_ref;

  for (genvar k = 0; k < N_FF; k++) begin : g_cut
    assign #(DELAY[k]) d[k] = ~q[k];
  end

  // edges of the chip clock while the fast clock is selected
  int      n_fast_edges;
  realtime fast_edge [2];
  always @(posedge dut.clk) if (cs) begin
    if (n_fast_edges < 2) fast_edge[n_fast_edges] = $realtime;
    n_fast_edges++;
  end

  always @(posedge dut.clk) if (!cs) begin
    for (int i = 0; i < M; i++) if (dut.sck[i]) n_sck[i]++;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] lfsr_step(input logic [W-1:0] s, input logic b);
    return {s[2], s[1], s[0] ^ s[3], b ^ s[3]};   // x^4 + x + 1
  endfunction

  function automatic realtime width_ps(input int c);
    return 1000.0 - 5.2 * c;
  endfunction

  task automatic tck_pulse();
    #(TCK_HALF) tck = 1'b1;
    #(TCK_HALF) tck = 1'b0;
  endtask

  task automatic scan_in(input logic [N_FF-1:0] v);
    se0 = 1'b1; se1 = 1'b1;
    for (int k = N_FF - 1; k >= 0; k--) begin sci = v[k]; tck_pulse(); end
    sci = 1'b0;
    n_scan_in++;
  endtask

  task automatic reload();
    se0 = 1'b1; se1 = 1'b0; scj = '0;
    tck_pulse();
    n_reload++;
  endtask

  // one at-speed test with generator code c
  task automatic double_pulse(input int c);
    cnt = 7'(c);
    se0 = 1'b0;
    #2000;
    cs = 1'b1;
    n_fast_edges = 0;
    #2000 trg = 1'b1;
    #6000 trg = 1'b0;
    #4000 cs = 1'b0;
    checks++;
    if (n_fast_edges != 2) begin
      failures++;
      $display("double pulse: %0d edges", n_fast_edges);
    end else begin
      checks++;
      if (fast_edge[1] - fast_edge[0] < width_ps(c) - 0.2 ||
          fast_edge[1] - fast_edge[0] > width_ps(c) + 0.2) begin
        failures++;
        $display("double pulse width %0.1f ps, expected %0.1f", fast_edge[1] - fast_edge[0], width_ps(c));
      end
    end
    n_double_pulse++;
  endtask

  // shift the responses of one stage to the signature registers
  task automatic transfer(input int s);
    int shifts = 0;
    logic [1:0] code [CL+1];
    foreach (code[t]) code[t] = '0;
    for (int i = 0; i < M; i++) begin
      int clocks = CL - STAGE_POS[s][i];
      if (clocks > shifts) shifts = clocks;
      checks++;
      if (code[clocks] != 0) failures++;   // two registers in one clock
      code[clocks] = 2'(i + 1);
    end
    se0 = 1'b1; se1 = 1'b1;
    for (int t = 1; t <= shifts; t++) begin
      scj = code[t];
      tck_pulse();
    end
    scj = '0;
  endtask

  // read all signature registers; result[i] is register i
  task automatic read_out(output logic [W-1:0] result [M]);
    sge = 1'b0; sgs = 1'b1; scj = '0;
    #100;
    for (int i = M - 1; i >= 0; i--)
      for (int b = W - 1; b >= 0; b--) begin
        result[i][b] = sgo;
        tck_pulse();
      end
    sgs = 1'b0; sge = 1'b1;
    n_readout++;
  endtask

  task automatic reset_sig();
    #100 rst_sig = 1'b1;
    #100 rst_sig = 1'b0;
  endtask

  initial begin
    logic [N_FF-1:0] got;
    logic [W-1:0] sigs [M];
    logic [W-1:0] expect_sig [M];
    logic [W-1:0] table_sig [N_MEAS+1];
    int codes [N_MEAS];
    int trace_codes [4];
    logic [W-1:0] trace_expect [M];

    for (int t = 0; t < N_MEAS; t++) codes[t] = 10 * t;
    trace_codes = '{0, 20, 10, 30};

    #100 rst_ff = 1'b1; rst_sig = 1'b1;
    #200 rst_ff = 1'b0; rst_sig = 1'b0;
    #2000;

    // 1. scan in, latch, check the latches through sco, scan in again
    scan_in(VEC);
    checks++;
    if (q !== VEC) failures++;
    #1000 lck = 1'b1;
    #1000 lck = 1'b0;
    n_latch_store++;
    scan_in(~VEC);
    reload();
    se1 = 1'b1;
    for (int k = N_FF - 1; k >= 0; k--) begin got[k] = sco; tck_pulse(); end
    checks++;
    if (got !== VEC) begin failures++; $display("latch check read %b", got); end
    n_latch_check++;

    // 2. and 3. two measurement stages
    for (int s = 0; s < 2; s++) begin
      reset_sig();
      sge = 1'b1;
      foreach (expect_sig[i]) expect_sig[i] = '0;
      for (int t = 0; t < N_MEAS; t++) begin
        reload();
        checks++;
        if (q !== VEC) failures++;
        double_pulse(codes[t]);
        for (int i = 0; i < M; i++) begin
          automatic int k = i * CL + STAGE_POS[s][i];
          automatic logic pass = DELAY[k] < width_ps(codes[t]);
          logic resp;
          resp = pass ? VEC[k] : ~VEC[k];
          if (pass) n_pass++; else n_fail++;
          checks++;
          if (q[k] !== resp) begin
            failures++;
            $display("stage %0d test %0d ff %0d: response %b expected %b", s, t, k, q[k], resp);
          end
          expect_sig[i] = lfsr_step(expect_sig[i], resp);
        end
        transfer(s);
      end
      read_out(sigs);
      for (int i = 0; i < M; i++) begin
        automatic int k = i * CL + STAGE_POS[s][i];
        automatic int est = -1;
        automatic int truth = 0;
        checks++;
        if (sigs[i] !== expect_sig[i]) begin
          failures++;
          $display("stage %0d SIG%0d = %b expected %b", s, i, sigs[i], expect_sig[i]);
        end
        if (VEC[k]) n_rise_meas++; else n_fall_meas++;
        // signature table for this transition direction
        for (int c = 0; c <= N_MEAS; c++) begin
          table_sig[c] = '0;
          for (int t = 0; t < N_MEAS; t++)
            table_sig[c] = lfsr_step(table_sig[c], (t < c) ? VEC[k] : ~VEC[k]);
        end
        for (int c = 0; c <= N_MEAS; c++) if (table_sig[c] == sigs[i] && est < 0) est = c;
        for (int t = 0; t < N_MEAS; t++) if (DELAY[k] < width_ps(codes[t])) truth = t + 1;
        checks++;
        if (est != truth) begin
          failures++;
          $display("ff %0d: estimated case %0d, true case %0d", k, est, truth);
        end else
          $display("ff %0d (%s): delay %0.0f ps -> case %0d", k,
                   VEC[k] ? "rise" : "fall", DELAY[k], est);
      end
    end

    // 4. tracing mode, stage 0 paths, non-monotonic widths
    reset_sig();
    sge = 1'b0;
    foreach (trace_expect[i]) trace_expect[i] = '0;
    for (int t = 0; t < 4; t++) begin
      reload();
      double_pulse(trace_codes[t]);
      for (int i = 0; i < M; i++) begin
        automatic int k = i * CL + STAGE_POS[0][i];
        automatic logic pass = DELAY[k] < width_ps(trace_codes[t]);
        trace_expect[i] = {trace_expect[i][W-2:0], pass ? VEC[k] : ~VEC[k]};
      end
      transfer(0);
    end
    read_out(sigs);
    for (int i = 0; i < M; i++) begin
      checks++;
      if (sigs[i] !== trace_expect[i]) begin
        failures++;
        $display("trace SIG%0d = %b expected %b", i, sigs[i], trace_expect[i]);
      end
    end
    n_trace++;

    $display("scan-in %0d, latch store %0d, latch check %0d, reload %0d, double pulse %0d",
             n_scan_in, n_latch_store, n_latch_check, n_reload, n_double_pulse);
    $display("pass %0d, fail %0d, rising %0d, falling %0d, captures sck0..2 %0d %0d %0d, read-out %0d, trace %0d",
             n_pass, n_fail, n_rise_meas, n_fall_meas, n_sck[0], n_sck[1], n_sck[2], n_readout, n_trace);
    foreach (n_sck[i]) begin checks++; if (n_sck[i] == 0) failures++; end
    checks++; if (n_scan_in == 0 || n_latch_store == 0 || n_latch_check == 0) failures++;
    checks++; if (n_reload == 0 || n_double_pulse == 0) failures++;
    checks++; if (n_pass == 0 || n_fail == 0) failures++;
    checks++; if (n_rise_meas == 0 || n_fall_meas == 0) failures++;
    checks++; if (n_readout == 0 || n_trace == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
