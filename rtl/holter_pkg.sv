// holter_pkg -- types and constants shared by the FPGA side of the Holter
// recorder.
//
// Samples from the 10-bit TLC1549 converter are carried through the
// wavelet filter as 16-bit two's-complement words (sample_t). The FSMC
// register map that the STM32 sees is defined here as well, so that the
// bus slave and any testbench agree on it. The register map, the word
// width and the frame length are choices of this design; the document
// gives only the 10-bit converter, the 16-bit parallel FSMC link and the
// filter structure.
package holter_pkg;

  // ADC resolution (TLC1549 is a 10-bit converter).
  localparam int unsigned ADC_BITS = 10;
  // Internal sample / coefficient width of the filter datapath.
  localparam int unsigned DW = 16;
  // FSMC data bus width.
  localparam int unsigned BUS_W = 16;
  // Levels of the baseline (WTSE) decomposition and of the de-noising
  // decomposition / reconstruction.
  localparam int unsigned BASE_LEVELS = 8;
  localparam int unsigned DEN_LEVELS  = 4;

  typedef logic [ADC_BITS-1:0] adc_word_t;
  typedef logic signed [DW-1:0] sample_t;
  typedef logic [DW-1:0] thr_t;  // unsigned soft-threshold magnitude

  // FSMC register offsets (half-word addresses, register region).
  typedef enum logic [3:0] {
    REG_CTRL   = 4'h0,  // RW bit0: acquisition enable
    REG_STATUS = 4'h1,  // R  bit0 frame ready, bit1 filter busy, bit2 overrun
    REG_ACK    = 4'h2,  // W  bit0: frame consumed, bit2: clear overrun
    REG_FRAMES = 4'h3,  // R  number of frames completed (wraps)
    REG_THR1   = 4'h4,  // RW soft threshold, detail level 1
    REG_THR2   = 4'h5,
    REG_THR3   = 4'h6,
    REG_THR4   = 4'h7,
    REG_ID     = 4'h8   // R  constant design identifier
  } fsmc_reg_e;

  localparam logic [BUS_W-1:0] DESIGN_ID = 16'hEC61;

  // Default soft thresholds of detail levels 1..4 (in ADC LSBs).
  localparam logic [DW-1:0] THR1_DEF = 16'd6;
  localparam logic [DW-1:0] THR2_DEF = 16'd4;
  localparam logic [DW-1:0] THR3_DEF = 16'd2;
  localparam logic [DW-1:0] THR4_DEF = 16'd0;

endpackage
