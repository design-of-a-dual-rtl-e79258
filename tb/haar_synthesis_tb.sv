// haar_synthesis_tb -- checks one thresholded inverse Haar SWT step against
// a real-arithmetic model, and checks that with a zero threshold it undoes
// an analysis step computed here to within one LSB.
`timescale 1ns/1ps
module haar_synthesis_tb;
  import holter_pkg::*;
  sample_t a0, d0, a1, d1, y;
  thr_t    thr;
  int checks = 0, failures = 0;

  haar_synthesis dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real soft_r(input real d, input real t);
    real m;
    m = (d < 0.0) ? -d : d;
    m = m - t;
    if (m <= 0.0) return 0.0;
    return (d < 0.0) ? -m : m;
  endfunction

  task automatic try(input int va0, vd0, va1, vd1, vt);
    int e;
    a0 = sample_t'(va0); d0 = sample_t'(vd0); a1 = sample_t'(va1); d1 = sample_t'(vd1);
    thr = thr_t'(vt);
    #1;
    e = int'($floor((real'(va0) + soft_r(real'(vd0), real'(vt)) + real'(va1)
                     - soft_r(real'(vd1), real'(vt))) / 2.0));
    checks++;
    if (int'(y) != e) begin
      failures++;
      $display("FAIL a0=%0d d0=%0d a1=%0d d1=%0d t=%0d: y=%0d expected %0d",
               va0, vd0, va1, vd1, vt, y, e);
    end
  endtask

  initial begin
    int xm, x0, xp, aa0, dd0, aa1, dd1, diff;
    try(0, 0, 0, 0, 0); try(10, 5, 10, -5, 0); try(10, 5, 10, -5, 3);
    try(10, 5, 10, -5, 9); try(-7, -3, 4, 2, 1); try(100, -50, -20, 30, 40);
    for (int i = 0; i < 2000; i++)
      try(int'($urandom_range(4000)) - 2000, int'($urandom_range(4000)) - 2000,
          int'($urandom_range(4000)) - 2000, int'($urandom_range(4000)) - 2000,
          int'($urandom_range(300)));
    // round trip: x[n-s], x[n], x[n+s] -> (A,D)[n], (A,D)[n+s] -> x[n]
    for (int i = 0; i < 1000; i++) begin
      xm = int'($urandom_range(2046)) - 1023;
      x0 = int'($urandom_range(2046)) - 1023;
      xp = int'($urandom_range(2046)) - 1023;
      aa0 = int'($floor(real'(x0 + xm) / 2.0)); dd0 = int'($floor(real'(x0 - xm) / 2.0));
      aa1 = int'($floor(real'(xp + x0) / 2.0)); dd1 = int'($floor(real'(xp - x0) / 2.0));
      a0 = sample_t'(aa0); d0 = sample_t'(dd0); a1 = sample_t'(aa1); d1 = sample_t'(dd1);
      thr = '0;
      #1;
      diff = int'(y) - x0;
      checks++;
      if (diff > 1 || diff < -1) begin
        failures++;
        $display("FAIL round trip x=%0d y=%0d", x0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
