// stm32_fsmc_model -- behavioural model of the STM32 FSMC in asynchronous
// SRAM mode 1 (16-bit, non-multiplexed), for simulation only.
//
// Tasks write16/read16 produce one bus access each: the address is put out
// and NE lowered, ADDSET HCLK periods later NWE (or NOE) goes low for
// DATAST periods; a read samples the data bus at the end of that phase.
// NE, NWE and NOE return high for one HCLK after the access. Default
// timing: 72 MHz HCLK, ADDSET 4, DATAST 8 (write) / 18 (read).
`timescale 1ns/1ps
module stm32_fsmc_model #(
  parameter int  AW1        = 11,       // address pins
  parameter real HCLK_NS    = 13.889,
  parameter int  ADDSET     = 4,
  parameter int  DATAST_WR  = 8,
  parameter int  DATAST_RD  = 18
) (
  output logic           ne,
  output logic           noe,
  output logic           nwe,
  output logic [AW1-1:0] a,
  output logic [15:0]    d_to_fpga,
  input  logic [15:0]    d_from_fpga,
  input  logic           d_oe
);
  int accesses = 0;
  int contention = 0;   // FPGA drove the bus during a write

  initial begin
    ne = 1; noe = 1; nwe = 1; a = '0; d_to_fpga = '0;
  end

  task automatic write16(input int addr, input logic [15:0] data);
    a = AW1'(addr); d_to_fpga = data; ne = 0;
    #(HCLK_NS * ADDSET);
    nwe = 0;
    #(HCLK_NS * DATAST_WR);
    if (d_oe) contention++;
    nwe = 1;
    #(HCLK_NS);
    ne = 1;
    #(HCLK_NS);
    accesses++;
  endtask

  task automatic read16(input int addr, output logic [15:0] data);
    a = AW1'(addr); ne = 0;
    #(HCLK_NS * ADDSET);
    noe = 0;
    #(HCLK_NS * DATAST_RD);
    data = d_oe ? d_from_fpga : 16'hDEAD;
    noe = 1;
    #(HCLK_NS);
    ne = 1;
    #(HCLK_NS);
    accesses++;
  endtask
endmodule
