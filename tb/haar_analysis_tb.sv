// haar_analysis_tb -- checks one Haar SWT analysis step against
// floor((a+b)/2) and floor((a-b)/2) computed in real arithmetic, for corner
// values and random signed 16-bit pairs.
`timescale 1ns/1ps
module haar_analysis_tb;
  import holter_pkg::*;
  sample_t a, b, approx, detail;
  int checks = 0, failures = 0;

  haar_analysis dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int av, bv);
    int ea, ed;
    a = sample_t'(av); b = sample_t'(bv);
    #1;
    ea = int'($floor(real'(av + bv) / 2.0));
    ed = int'($floor(real'(av - bv) / 2.0));
    checks += 2;
    if (int'(approx) != ea || int'(detail) != ed) begin
      failures++;
      $display("FAIL a=%0d b=%0d: approx %0d/%0d detail %0d/%0d",
               av, bv, approx, ea, detail, ed);
    end
  endtask

  initial begin
    try(0, 0); try(1, 0); try(0, 1); try(-1, 0); try(3, -4);
    try(32767, 32767); try(-32768, -32768); try(32767, -32768); try(-32768, 32767);
    for (int i = 0; i < 2000; i++)
      try(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
