// holter_fpga_top_full_tb -- one complete operation of the FPGA side at its
// default sizes: 25 MHz clock, 360 samples/s from the converter model with
// data-sheet timing, one 1024-sample frame (about 2.8 s of ECG, some 71
// million clocks), filtered and read out by the STM32 model over the FSMC
// bus. The frame is compared word for word with the software model, and
// the filter time (17*(N+1)+1 clocks from a full bank to frame ready) and
// the sample period are checked.
`timescale 1ns/1ps
module holter_fpga_top_full_tb;
  import holter_pkg::*;
  import swt_ref_pkg::*;
  localparam int N = 1024, PER = 69444;
  localparam int AW = $clog2(N);
  localparam real TCLK = 40.0;

  logic clk = 0, rst_n = 0;
  logic adc_cs_n, adc_io_clk, adc_dout;
  logic fsmc_ne, fsmc_noe, fsmc_nwe, fsmc_d_oe;
  logic [AW:0] fsmc_a;
  logic [15:0] fsmc_d_in, fsmc_d_out;
  logic [9:0] analog = 0;

  int checks = 0, failures = 0;
  int accepted [$];
  int thr_cfg[4];
  longint cyc = 0, t_full = -1, t_done = -1, t_s0 = -1, t_s1 = -1;

  holter_fpga_top dut (.*);

  tlc1549_model adc (.cs_n(adc_cs_n), .io_clk(adc_io_clk), .dout(adc_dout), .analog(analog));

  stm32_fsmc_model #(.AW1(AW + 1)) cpu (
    .ne(fsmc_ne), .noe(fsmc_noe), .nwe(fsmc_nwe), .a(fsmc_a),
    .d_to_fpga(fsmc_d_in), .d_from_fpga(fsmc_d_out), .d_oe(fsmc_d_oe));

  always #20 clk = ~clk;

  initial begin
    #(TCLK * PER * (N + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a 360 samples/s ECG-like signal: 300 samples per beat (72 beats/min)
  always @(negedge adc_io_clk) analog <= 10'(ecg_sample(adc.history.size(), 300, 10));

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.s_valid && !dut.overrun) begin
      accepted.push_back(int'(dut.s_data));
      if (accepted.size() == 1) t_s0 = cyc;
      if (accepted.size() == 2) t_s1 = cyc;
    end
    if (rst_n && dut.in_valid && !dut.busy && t_full < 0) t_full = cyc;
    if (rst_n && dut.frame_done && t_done < 0) t_done = cyc;
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
    thr_cfg = '{int'(THR1_DEF), int'(THR2_DEF), int'(THR3_DEF), int'(THR4_DEF)};
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    cpu.write16(REG_CTRL, 16'h0001);
    do begin
      #(TCLK * PER * 16);
      cpu.read16(REG_STATUS, r);
    end while (!r[0]);
    x = new[N];
    for (int i = 0; i < N; i++) x[i] = accepted[i];
    filter_frame(x, thr_cfg, y, c);
    bad = 0;
    for (int i = 0; i < N; i++) begin
      cpu.read16((1 << AW) | i, r);
      if (sample_t'(r) != sample_t'(y[i])) begin
        if (bad < 4) $display("  word %0d: %0d expected %0d", i, sample_t'(r), y[i]);
        bad++;
      end
    end
    chk(bad == 0, $sformatf("%0d frame words wrong", bad));
    cpu.write16(REG_ACK, 16'h0001);
    cpu.read16(REG_STATUS, r);
    chk(r[0] == 1'b0, "frame released by ACK");
    chk(t_done - t_full == longint'(17 * (N + 1) + 1),
        $sformatf("filter time %0d clocks", t_done - t_full));
    chk(t_s1 - t_s0 == longint'(PER), $sformatf("sample period %0d clocks", t_s1 - t_s0));
    chk(adc.violations == 0, "converter timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
