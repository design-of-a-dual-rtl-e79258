// swt_wtse_filter_tb -- runs the de-noising filter at its default frame
// length on three frames and compares every output word with the software
// model in swt_ref_pkg. Also checks: the frame time of 17*(N+1) clocks,
// one input-bank release per frame, the hold-off while the previous output
// frame is not yet taken (out_free low), that with zero thresholds the
// output equals the baseline-free signal to within 4 LSB, and that the
// baseline (a slow offset ramp) is removed.
`timescale 1ns/1ps
module swt_wtse_filter_tb;
  import holter_pkg::*;
  import swt_ref_pkg::*;
  localparam int N = 1024;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_release, out_free = 1, out_we, out_done, busy;
  logic [AW-1:0] in_addr0, in_addr1, out_addr;
  adc_word_t in_data0, in_data1;
  thr_t thr [DEN_LEVELS];
  sample_t out_data;

  adc_word_t inmem [N];
  int        outmem [N];
  int checks = 0, failures = 0;
  int releases = 0, writes = 0, wait_cycles = 0;

  swt_wtse_filter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // input buffer model: synchronous read, one cycle
  always_ff @(posedge clk) begin
    in_data0 <= inmem[in_addr0];
    in_data1 <= inmem[in_addr1];
  end
  always @(posedge clk) begin
    if (in_release) releases++;
    if (out_we) begin
      outmem[out_addr] = int'(out_data);
      writes++;
    end
    if (busy && !out_free) wait_cycles++;
  end

  initial begin
    #(10.0 * N * 17 * 8);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_frame(input int frame, input int t[4], input int hold, output int y[], output int c[]);
    int x[];
    int t0, t1, rel0, bad;
    x = new[N];
    for (int i = 0; i < N; i++) begin
      x[i] = ecg_sample(i + frame * N, 120, 8) ;
      if (frame == 2) x[i] = (x[i] / 2) + (i / 4);   // slow ramp as baseline
      if (x[i] > 1023) x[i] = 1023;
      inmem[i] = 10'(x[i]);
    end
    foreach (thr[k]) thr[k] = thr_t'(t[k]);
    filter_frame(x, t, y, c);
    rel0   = releases;
    writes = 0;
    out_free = (hold == 0);
    @(negedge clk);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    t0 = $time;  // first RUN cycle began at the previous rising edge
    if (hold != 0) begin
      repeat (16 * (N + 1) + hold) @(negedge clk);
      chk(busy && writes == 0, "filter holds the output while out_free is low");
      out_free = 1;
    end
    @(posedge out_done);
    t1 = $time;
    if (hold == 0)
      chk((t1 - t0 + 5) / 10 == 17 * (N + 1),
          $sformatf("frame time %0d clocks, expected %0d", (t1 - t0 + 5) / 10, 17 * (N + 1)));
    chk(releases == rel0 + 1, "one input release per frame");
    chk(writes == N, $sformatf("%0d output words written", writes));
    bad = 0;
    for (int i = 0; i < N; i++) if (outmem[i] != y[i]) begin
      if (bad < 5) $display("  frame %0d word %0d: %0d expected %0d", frame, i, outmem[i], y[i]);
      bad++;
    end
    chk(bad == 0, $sformatf("frame %0d: %0d words differ from the model", frame, bad));
    @(negedge clk);
  endtask

  initial begin
    int y[], c[];
    int t0[4] = '{0, 0, 0, 0};
    int t1[4] = '{6, 4, 2, 0};
    int t2[4] = '{20, 10, 5, 3};
    int err, mean;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // frame 0: zero thresholds, output must match the baseline-free signal
    run_frame(0, t0, 0, y, c);
    err = 0;
    for (int i = 0; i < N; i++) begin
      if (outmem[i] - c[i] > 4 || outmem[i] - c[i] < -4) err++;
    end
    chk(err == 0, $sformatf("zero-threshold output off the baseline-free signal at %0d words", err));
    // frame 1: default thresholds, output frame held back first
    run_frame(1, t1, 300, y, c);
    chk(wait_cycles >= 300, "hold-off observed");
    // frame 2: ramp baseline, strong thresholds; the output must average near zero
    run_frame(2, t2, 0, y, c);
    mean = 0;
    for (int i = 0; i < N; i++) mean += outmem[i];
    mean = mean / N;
    chk(mean < 20 && mean > -20, $sformatf("baseline removed (mean %0d)", mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
