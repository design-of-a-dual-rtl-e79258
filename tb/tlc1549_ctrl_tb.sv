// tlc1549_ctrl_tb -- runs the ADC controller against the converter model.
// Checks every delivered word against the value the model converted (one
// conversion earlier), the spacing of the sample strobes (SAMPLE_PERIOD
// clocks), the model's CS set-up and conversion-time checks, and that
// nothing happens while the controller is disabled.
`timescale 1ns/1ps
module tlc1549_ctrl_tb;
  import holter_pkg::*;
  localparam int PER = 400, HALF = 3, SETUP = 5, CONV = 100;
  localparam real TCLK = 40.0;

  logic clk = 0, rst_n = 0, enable = 0;
  logic adc_cs_n, adc_io_clk, adc_dout, sample_valid;
  adc_word_t sample;
  logic [9:0] analog = 0;
  int checks = 0, failures = 0;
  int nvalid = 0, cyc = 0, last_cyc = -1, cs_falls = 0;

  tlc1549_ctrl #(.SAMPLE_PERIOD(PER), .CLK_HALF(HALF), .CS_SETUP(SETUP),
                 .CONV_CYCLES(CONV)) dut (.*);
  tlc1549_model #(.CONV_NS(CONV * TCLK), .SETUP_NS(SETUP * TCLK)) adc (
    .cs_n(adc_cs_n), .io_clk(adc_io_clk), .dout(adc_dout), .analog(analog));

  always #20 clk = ~clk;

  initial begin
    #(TCLK * PER * 40);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;
  always @(negedge adc_cs_n) cs_falls++;
  always @(negedge adc_io_clk) analog <= 10'($urandom);

  always @(posedge clk) begin
    if (rst_n && sample_valid) begin
      checks++;
      if (nvalid >= adc.history.size() || sample !== adc.history[nvalid]) begin
        failures++;
        $display("FAIL sample %0d = %h", nvalid, sample);
      end
      if (last_cyc >= 0) begin
        checks++;
        if (cyc - last_cyc != PER) begin
          failures++;
          $display("FAIL sample spacing %0d clocks", cyc - last_cyc);
        end
      end
      last_cyc = cyc;
      nvalid++;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    cs_falls = 0;
    repeat (3 * PER) @(posedge clk);
    checks++;
    if (cs_falls != 0 || nvalid != 0) begin
      failures++;
      $display("FAIL activity while disabled");
    end
    enable = 1;
    wait (nvalid == 20);
    @(posedge clk);
    checks++;
    if (adc.violations != 0) begin
      failures++;
      $display("FAIL %0d converter timing violations", adc.violations);
    end
    // the first word read after enable is stale and must be dropped
    checks++;
    if (adc.history.size() != 21) begin
      failures++;
      $display("FAIL %0d conversions for 20 samples", adc.history.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
