// holter_fpga_top_tb -- end-to-end test of the FPGA side of the recorder at
// reduced sizes (256-sample frames, 200-clock sample period, fast ADC
// timing), with the converter model on the ADC pins and an STM32 model on
// the FSMC pins.
//
// The processor model follows the recorder's main loop: program the
// thresholds, set the enable bit, then for every frame poll STATUS until
// frame ready, read the whole frame through the frame window and write ACK.
// Each frame read is compared word for word with the software model applied
// to the samples the buffer accepted. For frame 1 the processor delays its
// ACK by several frame times, which must make the filter hold its finished
// frame back and then make the input buffer drop samples (overrun); the
// overrun flag is checked and cleared and the later frames must still be
// right. The test counts how often each mechanism happened (bank hand-over,
// hold-off, overrun, undelayed frame latency of 17*(N+1) clocks) and
// counts a failure for any that never did.
`timescale 1ns/1ps
module holter_fpga_top_tb;
  import holter_pkg::*;
  import swt_ref_pkg::*;
  localparam int N = 256, PER = 200, HALF = 2, SETUP = 4, CONV = 100;
  localparam int AW = $clog2(N);
  localparam int FRAMES = 6;
  localparam real TCLK = 40.0;

  logic clk = 0, rst_n = 0;
  logic adc_cs_n, adc_io_clk, adc_dout;
  logic fsmc_ne, fsmc_noe, fsmc_nwe, fsmc_d_oe;
  logic [AW:0] fsmc_a;
  logic [15:0] fsmc_d_in, fsmc_d_out;
  logic [9:0] analog = 0;

  int checks = 0, failures = 0;
  int accepted [$];
  int n_swaps = 0, n_hold = 0, n_overrun = 0, n_latency_ok = 0, n_latency = 0;
  int t_full = -1, cyc = 0;
  bit held = 0;
  int thr_cfg[4] = '{9, 5, 3, 1};

  holter_fpga_top #(
    .FRAME_LEN(N), .SAMPLE_PERIOD(PER), .ADC_CLK_HALF(HALF),
    .ADC_CS_SETUP(SETUP), .ADC_CONV(CONV)
  ) dut (.*);

  tlc1549_model #(.CONV_NS(CONV * TCLK), .SETUP_NS(SETUP * TCLK)) adc (
    .cs_n(adc_cs_n), .io_clk(adc_io_clk), .dout(adc_dout), .analog(analog));

  stm32_fsmc_model #(.AW1(AW + 1)) cpu (
    .ne(fsmc_ne), .noe(fsmc_noe), .nwe(fsmc_nwe), .a(fsmc_a),
    .d_to_fpga(fsmc_d_in), .d_from_fpga(fsmc_d_out), .d_oe(fsmc_d_oe));

  always #20 clk = ~clk;

  initial begin
    #(TCLK * PER * N * (FRAMES + 6));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ECG-like input with noise, one new value per conversion
  always @(negedge adc_io_clk) analog <= 10'(ecg_sample(adc.history.size(), 72, 12));

  // observe what the design did
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.s_valid && !dut.overrun) accepted.push_back(int'(dut.s_data));
    if (rst_n && dut.overrun) n_overrun++;
    if (rst_n && dut.in_release) n_swaps++;
    if (dut.busy && dut.frame_ready && dut.u_filt.state == 2'd3 /* ST_WAIT_OUT */) begin
      n_hold++;
      held = 1;
    end
    if (dut.frame_done && t_full >= 0) begin
      if (!held) begin
        n_latency++;
        if (cyc - t_full == 17 * (N + 1) + 1) n_latency_ok++;
        else $display("  frame latency %0d clocks (t_full %0d, now %0d)", cyc - t_full, t_full, cyc);
      end
      t_full = -1;
      held   = 0;
    end
    if (rst_n && dut.in_valid && !dut.busy && t_full < 0) t_full = cyc;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [15:0] r;
    int x[], y[], c[], bad;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    cpu.read16(REG_ID, r);
    chk(r == DESIGN_ID, "ID register");
    for (int k = 0; k < 4; k++) cpu.write16(REG_THR1 + k, 16'(thr_cfg[k]));
    cpu.write16(REG_CTRL, 16'h0001);
    for (int f = 0; f < FRAMES; f++) begin
      do cpu.read16(REG_STATUS, r); while (!r[0]);
      x = new[N];
      for (int i = 0; i < N; i++) x[i] = accepted[f * N + i];
      filter_frame(x, thr_cfg, y, c);
      bad = 0;
      for (int i = 0; i < N; i++) begin
        cpu.read16((1 << AW) | i, r);
        if (sample_t'(r) != sample_t'(y[i])) begin
          if (bad < 4) $display("  frame %0d word %0d: %0d expected %0d", f, i, sample_t'(r), y[i]);
          bad++;
        end
      end
      chk(bad == 0, $sformatf("frame %0d: %0d words wrong", f, bad));
      if (f == 1) begin
        // processor busy elsewhere for three frame times
        #(TCLK * PER * N * 3);
        cpu.read16(REG_STATUS, r);
        chk(r[2], "overrun flag set while the processor lagged");
        cpu.write16(REG_ACK, 16'h0005);
        cpu.read16(REG_STATUS, r);
        chk(!r[2], "overrun flag cleared");
      end else begin
        cpu.write16(REG_ACK, 16'h0001);
      end
    end
    chk(adc.violations == 0, "converter timing");
    chk(cpu.contention == 0, "no bus contention");
    $display("mechanisms: bank hand-overs %0d, hold-off cycles %0d, dropped samples %0d, on-time frames %0d/%0d",
             n_swaps, n_hold, n_overrun, n_latency_ok, n_latency);
    chk(n_swaps >= FRAMES, "input banks handed over every frame");
    chk(n_hold > 0, "filter held a finished frame back");
    chk(n_overrun > 0, "input buffer overran");
    chk(n_latency_ok > 0 && n_latency_ok == n_latency, "frame latency 17*(N+1)+1 clocks when not held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
