// pingpong_buffer -- the two alternating input buffers (RAMA and RAMB) with
// their write-side and read-side selectors.
//
// ADC samples are written, one per wr_en strobe, into the bank chosen by
// the write selector. When a bank holds DEPTH samples it is marked full
// and the write selector switches to the other bank, so acquisition goes
// on while the filter works on the full bank. The read selector always
// points at the older full bank: rd_valid says it is there, two
// synchronous read ports (one-cycle latency, as sdp_ram) serve the
// filter, and a one-cycle rd_release hands the bank back for writing.
//
// If the write side reaches a bank that has not been released yet, the
// filter has fallen behind: the sample is dropped and overrun pulses.
// The double-buffer structure is the document's; the drop-on-overrun
// policy is this design's choice.
module pingpong_buffer
  import holter_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side (ADC)
  input  logic          wr_en,
  input  adc_word_t     wr_data,
  output logic          overrun,    // one-cycle strobe: sample dropped
  // read side (filter)
  output logic          rd_valid,   // a full bank is ready
  input  logic [AW-1:0] rd_addr0,
  output adc_word_t     rd_data0,
  input  logic [AW-1:0] rd_addr1,
  output adc_word_t     rd_data1,
  input  logic          rd_release  // done with the current read bank
);

  logic [1:0]    bank_full;
  logic          wr_bank, rd_bank, rd_bank_q;
  logic [AW-1:0] wr_ptr;
  logic          wr_ok;
  adc_word_t     q0 [2];
  adc_word_t     q1 [2];

  assign wr_ok    = wr_en && !bank_full[wr_bank];
  assign overrun  = wr_en &&  bank_full[wr_bank];
  assign rd_valid = bank_full[rd_bank];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_full <= '0;
      wr_bank   <= 1'b0;
      rd_bank   <= 1'b0;
      wr_ptr    <= '0;
    end else begin
      if (wr_ok) begin
        if (wr_ptr == AW'(DEPTH - 1)) begin
          bank_full[wr_bank] <= 1'b1;
          wr_bank            <= ~wr_bank;
          wr_ptr             <= '0;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
      if (rd_release && bank_full[rd_bank]) begin
        bank_full[rd_bank] <= 1'b0;
        rd_bank            <= ~rd_bank;
      end
    end
  end

  // read data selector follows the bank that was addressed a cycle ago
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_bank_q <= 1'b0;
    else        rd_bank_q <= rd_bank;
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    sdp_ram #(.WIDTH(ADC_BITS), .DEPTH(DEPTH)) u_ram (
      .clk    (clk),
      .we     (wr_ok && (wr_bank == 1'(b))),
      .waddr  (wr_ptr),
      .wdata  (wr_data),
      .raddr0 (rd_addr0),
      .rdata0 (q0[b]),
      .raddr1 (rd_addr1),
      .rdata1 (q1[b])
    );
  end

  assign rd_data0 = q0[rd_bank_q];
  assign rd_data1 = q1[rd_bank_q];

  // a bank is never written and released in the same cycle
  assert property (@(posedge clk) rd_release |-> rd_valid)
    else $error("rd_release without a full read bank");

endmodule
