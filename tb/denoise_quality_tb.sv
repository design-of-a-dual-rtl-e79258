// denoise_quality_tb -- measures what the filter does to a noisy ECG.
//
// A synthetic 360 samples/s ECG s (a sharp R spike and a T wave every 0.8
// s) is corrupted with a 0.5 Hz baseline wander b of +-150 LSB and uniform
// noise w of +-14 LSB, the two disturbances the filter is meant to remove.
// Five frames go through swt_wtse_filter at its default size:
//   clean   s,          zero thresholds
//   wander  s + b,      zero thresholds      -> noise-free target
//   raw     s + b + w,  zero thresholds      -> no noise removal
//   def     s + b + w,  default thresholds
//   strong  s + b + w,  thresholds 16/10/6/2
// (all with a 400 LSB offset). Checks: the wander is suppressed (wander vs
// clean differs by less than a third of b), the thresholds reduce the noise
// left in the output against the noise-free target (def < raw, strong <
// 0.8 * raw), and the R peaks keep at least 80 % of their height. The RMS
// figures are printed.
`timescale 1ns/1ps
module denoise_quality_tb;
  import holter_pkg::*;
  localparam int N = 1024;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_release, out_free = 1, out_we, out_done, busy;
  logic [AW-1:0] in_addr0, in_addr1, out_addr;
  adc_word_t in_data0, in_data1;
  thr_t thr [DEN_LEVELS];
  sample_t out_data;

  adc_word_t inmem [N];
  int outmem [N];
  int checks = 0, failures = 0;

  swt_wtse_filter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    in_data0 <= inmem[in_addr0];
    in_data1 <= inmem[in_addr1];
  end
  always @(posedge clk) if (out_we) outmem[out_addr] = int'(out_data);

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

  task automatic run(input int x[], input int t0, t1, t2, t3, output int y[]);
    foreach (inmem[i]) inmem[i] = 10'(x[i]);
    thr[0] = thr_t'(t0); thr[1] = thr_t'(t1); thr[2] = thr_t'(t2); thr[3] = thr_t'(t3);
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    @(posedge out_done);
    @(negedge clk);
    y = new[N];
    foreach (y[i]) y[i] = outmem[i];
  endtask

  function automatic real rms_diff(input int a[], input int b[]);
    real acc = 0.0;
    foreach (a[i]) acc += real'(a[i] - b[i]) ** 2;
    return $sqrt(acc / real'(a.size()));
  endfunction

  function automatic int peak(input int a[]);
    int m = -100000;
    foreach (a[i]) if (a[i] > m) m = a[i];
    return m;
  endfunction

  initial begin
    int s[], xn[], xc[], xb[], y_clean[], y_wand[], y_raw[], y_def[], y_str[];
    real r_raw, r_def, r_str, r_base, r_noise, r_wand;
    int p, base, noise;
    s = new[N]; xn = new[N]; xc = new[N]; xb = new[N];
    r_base = 0.0; r_noise = 0.0;
    for (int i = 0; i < N; i++) begin
      p = i % 288;                                   // 75 beats/min
      s[i] = 0;
      if (p >= 40 && p < 44) s[i] = 420 - 100 * (p - 40 > 2 ? 4 - (p - 40) : p - 40) - 60;
      if (p >= 44 && p < 48) s[i] = -40 + 10 * (p - 44);
      if (p >= 100 && p < 160) s[i] = int'(70.0 * $sin(3.14159265 * real'(p - 100) / 60.0));
      base  = int'(150.0 * $sin(2.0 * 3.14159265 * real'(i) / 720.0));
      noise = int'($urandom_range(28)) - 14;
      xc[i] = 400 + s[i];
      xb[i] = 400 + s[i] + base;
      xn[i] = 400 + s[i] + base + noise;
      r_base  += real'(base) ** 2;
      r_noise += real'(noise) ** 2;
    end
    r_base  = $sqrt(r_base / N);
    r_noise = $sqrt(r_noise / N);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(xc, 0, 0, 0, 0, y_clean);
    run(xb, 0, 0, 0, 0, y_wand);
    run(xn, 0, 0, 0, 0, y_raw);
    run(xn, int'(THR1_DEF), int'(THR2_DEF), int'(THR3_DEF), int'(THR4_DEF), y_def);
    run(xn, 16, 10, 6, 2, y_str);
    r_wand = rms_diff(y_wand, y_clean);
    r_raw  = rms_diff(y_raw, y_wand);
    r_def  = rms_diff(y_def, y_wand);
    r_str  = rms_diff(y_str, y_wand);
    $display("rms in: wander %0.1f, noise %0.1f; wander left %0.2f; noise left: raw %0.2f, default thresholds %0.2f, strong %0.2f",
             r_base, r_noise, r_wand, r_raw, r_def, r_str);
    $display("R peak: clean %0d, default %0d, strong %0d", peak(y_wand), peak(y_def), peak(y_str));
    chk(r_wand < r_base / 3.0, "baseline wander removed");
    chk(r_def < r_raw, "default thresholds reduce the error");
    chk(r_str < 0.8 * r_raw, "strong thresholds reduce the error by 20 %");
    chk(peak(y_def) * 10 >= peak(y_wand) * 8, "R peak kept (default)");
    chk(peak(y_str) * 10 >= peak(y_wand) * 8, "R peak kept (strong)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
