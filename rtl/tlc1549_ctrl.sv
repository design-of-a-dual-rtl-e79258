// tlc1549_ctrl -- read-out controller for the TLC1549 10-bit serial ADC.
//
// The converter is operated entirely by the FPGA. Every SAMPLE_PERIOD
// clocks (while enabled) the controller pulls CS low, waits CS_SETUP
// clocks, then gives ten I/O clock pulses of CLK_HALF clocks high and
// CLK_HALF clocks low. The converter presents the MSB when CS falls and
// the next bit after each falling I/O clock edge, so the controller samples
// DATA OUT just before each rising edge. After the tenth falling edge the
// converter starts a new conversion; CS goes high and the controller waits
// CONV_CYCLES before it may select the chip again.
//
// Because the word read in one cycle is the result of the conversion
// started by the previous one, the first word after enable is discarded.
// sample_valid pulses for one clock with the new word on sample.
//
// The document names the converter and shows its CS, CLK and D OUT pins;
// the sequence and the default timings (about 1 MHz I/O clock, >= 1.43 us
// CS set-up, 21 us conversion time at a 25 MHz system clock) follow the
// converter's data sheet. The 360 Hz default sample rate is this design's
// choice (the rate of the MIT-BIH records used to test the filter).
module tlc1549_ctrl
  import holter_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 69444,  // clocks per sample
  parameter int unsigned CLK_HALF      = 13,     // clocks per I/O clock phase
  parameter int unsigned CS_SETUP      = 36,     // CS low to first rising edge
  parameter int unsigned CONV_CYCLES   = 525     // conversion time
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,        // acquisition on
  output logic      adc_cs_n,
  output logic      adc_io_clk,
  input  logic      adc_dout,
  output logic      sample_valid,  // one-cycle strobe
  output adc_word_t sample
);

  localparam int unsigned CW = $clog2(SAMPLE_PERIOD + CONV_CYCLES + CS_SETUP + 2);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_HIGH, S_LOW, S_CONV} state_e;

  state_e         state;
  logic [CW-1:0]  period_cnt;   // free-running sample timer
  logic [CW-1:0]  wait_cnt;     // phase timer
  logic [3:0]     bit_cnt;
  adc_word_t      shreg;
  logic           primed;       // a conversion has been started before
  logic           tick;

  assign tick = (period_cnt == CW'(SAMPLE_PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt <= '0;
    end else if (!enable || tick) begin
      period_cnt <= '0;
    end else begin
      period_cnt <= period_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      wait_cnt     <= '0;
      bit_cnt      <= '0;
      shreg        <= '0;
      primed       <= 1'b0;
      adc_cs_n     <= 1'b1;
      adc_io_clk   <= 1'b0;
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      sample_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!enable) primed <= 1'b0;
          if (enable && tick) begin
            adc_cs_n <= 1'b0;
            wait_cnt <= '0;
            bit_cnt  <= '0;
            state    <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (wait_cnt == CW'(CS_SETUP - 1)) begin
            shreg      <= {shreg[ADC_BITS-2:0], adc_dout};
            adc_io_clk <= 1'b1;
            wait_cnt   <= '0;
            state      <= S_HIGH;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_HIGH: begin
          if (wait_cnt == CW'(CLK_HALF - 1)) begin
            adc_io_clk <= 1'b0;
            wait_cnt   <= '0;
            bit_cnt    <= bit_cnt + 1'b1;
            state      <= S_LOW;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_LOW: begin
          if (wait_cnt == CW'(CLK_HALF - 1)) begin
            wait_cnt <= '0;
            if (bit_cnt == 4'(ADC_BITS)) begin
              // tenth falling edge given: conversion runs, release CS
              adc_cs_n     <= 1'b1;
              sample_valid <= primed;
              sample       <= shreg;
              primed       <= 1'b1;
              state        <= S_CONV;
            end else begin
              shreg      <= {shreg[ADC_BITS-2:0], adc_dout};
              adc_io_clk <= 1'b1;
              state      <= S_HIGH;
            end
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_CONV: begin
          if (wait_cnt == CW'(CONV_CYCLES - 1)) begin
            wait_cnt <= '0;
            state    <= S_IDLE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The read-out must fit into one sample period.
  initial begin
    assert (SAMPLE_PERIOD > CS_SETUP + 2 * ADC_BITS * CLK_HALF + CONV_CYCLES + 2)
      else $error("SAMPLE_PERIOD too short for the ADC read-out");
  end

endmodule
