// holter_fpga_top -- FPGA co-processor of a two-processor (STM32 + FPGA)
// Holter ECG recorder.
//
// The FPGA runs the ADC and the de-noising filter; the STM32 manages the
// recorder (key input, LCD plot, SD card) and fetches filtered ECG over
// its FSMC parallel bus. Data path:
//   tlc1549_ctrl    -> reads the 10-bit serial ADC once per sample period
//   pingpong_buffer -> RAMA/RAMB: one bank fills while the other is filtered
//   swt_wtse_filter -> 8-level Haar SWT, WTSE baseline removal, 4-level
//                      decomposition (RAM1-RAM4) and thresholded
//                      reconstruction, one frame of FRAME_LEN samples at a time
//   sdp_ram (frame) -> holds the de-noised frame for the processor
//   fsmc_slave      -> registers (enable, status, ack, thresholds) and the
//                      read window onto the de-noised frame
// The processor sets CTRL.enable, polls STATUS.frame_ready, reads the
// FRAME_LEN words of the frame and writes ACK; the filter does not
// overwrite the frame before that. The data bus is split into d_in, d_out
// and d_oe; the tristate pad is outside this module.
//
// Defaults: 25 MHz clock, 360 samples/s, 1024-sample frames (2.84 s of ECG
// per frame, about 17.4k clocks of filtering per frame). The blocks and
// their order are the document's; frame length, rate and bus protocol are
// this design's choices.
module holter_fpga_top
  import holter_pkg::*;
#(
  parameter int unsigned FRAME_LEN     = 1024,
  parameter int unsigned SAMPLE_PERIOD = 69444,
  parameter int unsigned ADC_CLK_HALF  = 13,
  parameter int unsigned ADC_CS_SETUP  = 36,
  parameter int unsigned ADC_CONV      = 525,
  localparam int unsigned AW = $clog2(FRAME_LEN)
) (
  input  logic             clk,
  input  logic             rst_n,
  // TLC1549
  output logic             adc_cs_n,
  output logic             adc_io_clk,
  input  logic             adc_dout,
  // STM32 FSMC
  input  logic             fsmc_ne,
  input  logic             fsmc_noe,
  input  logic             fsmc_nwe,
  input  logic [AW:0]      fsmc_a,
  input  logic [BUS_W-1:0] fsmc_d_in,
  output logic [BUS_W-1:0] fsmc_d_out,
  output logic             fsmc_d_oe
);

  logic          enable;
  logic          s_valid;
  adc_word_t     s_data;
  logic          overrun;
  logic          in_valid, in_release;
  logic [AW-1:0] in_addr0, in_addr1;
  adc_word_t     in_data0, in_data1;
  thr_t          thr [DEN_LEVELS];
  logic          frame_ready, frame_done, busy;
  logic          out_we;
  logic [AW-1:0] out_addr, frame_raddr;
  sample_t       out_data, frame_rdata, unused_rdata;

  tlc1549_ctrl #(
    .SAMPLE_PERIOD (SAMPLE_PERIOD),
    .CLK_HALF      (ADC_CLK_HALF),
    .CS_SETUP      (ADC_CS_SETUP),
    .CONV_CYCLES   (ADC_CONV)
  ) u_adc (
    .clk, .rst_n, .enable,
    .adc_cs_n, .adc_io_clk, .adc_dout,
    .sample_valid (s_valid),
    .sample       (s_data)
  );

  pingpong_buffer #(.DEPTH(FRAME_LEN)) u_pp (
    .clk, .rst_n,
    .wr_en      (s_valid),
    .wr_data    (s_data),
    .overrun    (overrun),
    .rd_valid   (in_valid),
    .rd_addr0   (in_addr0),
    .rd_data0   (in_data0),
    .rd_addr1   (in_addr1),
    .rd_data1   (in_data1),
    .rd_release (in_release)
  );

  swt_wtse_filter #(.N(FRAME_LEN)) u_filt (
    .clk, .rst_n,
    .in_valid, .in_addr0, .in_addr1, .in_data0, .in_data1, .in_release,
    .thr,
    .out_free (!frame_ready),
    .out_we, .out_addr, .out_data,
    .out_done (frame_done),
    .busy
  );

  sdp_ram #(.WIDTH(DW), .DEPTH(FRAME_LEN)) u_frame (
    .clk,
    .we     (out_we),
    .waddr  (out_addr),
    .wdata  (out_data),
    .raddr0 (frame_raddr),
    .rdata0 (frame_rdata),
    .raddr1 (frame_raddr),
    .rdata1 (unused_rdata)
  );

  fsmc_slave #(.AW(AW)) u_bus (
    .clk, .rst_n,
    .fsmc_ne, .fsmc_noe, .fsmc_nwe, .fsmc_a, .fsmc_d_in, .fsmc_d_out, .fsmc_d_oe,
    .enable, .thr,
    .frame_done, .frame_ready, .busy, .overrun,
    .frame_raddr, .frame_rdata
  );

endmodule
