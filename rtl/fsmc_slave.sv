// fsmc_slave -- FPGA side of the STM32 FSMC parallel bus (asynchronous
// SRAM mode, 16-bit, non-multiplexed address/data).
//
// The STM32 maps the FPGA on an FSMC chip select and talks to it with plain
// 16-bit loads and stores. The bus pins are sampled into the FPGA clock
// through two flip-flop stages. A write is committed on the rising edge of
// NWE (seen in the synchronised signal) with the address and data that
// were sampled while NWE was low. Reads are served from a registered
// multiplexer: the data bus is driven while NE and NOE are both low, and
// the word is valid four FPGA clocks after the address settles. The FSMC
// timing must therefore give: NWE low and NWE high each for more than one
// FPGA clock (ADDSET >= 4 and write DATAST >= 8 HCLK at 72 MHz against a
// 25 MHz FPGA clock), and at least five FPGA clocks (200 ns) from address
// to the end of a read (ADDSET + read DATAST >= 15 HCLK; 4 + 18 is used).
//
// Address map (half-word addresses): a[AW] = 1 selects the output frame,
// word a[AW-1:0] of the de-noised signal; a[AW] = 0 selects the registers
// of holter_pkg::fsmc_reg_e, decoded from a[3:0] only (CTRL enable bit,
// STATUS with frame-ready, ACK, frame counter, four thresholds, ID). frame_ready is set when the
// filter finishes a frame and cleared when the processor writes ACK bit 0;
// while it is set the filter holds the next frame back, which is the
// "wait until the FSMC side is ready, then send" step of the FPGA flow.
//
// The FSMC link, the enable from the STM32 and the ready/send hand-shake
// are the document's; the register map and timing are this design's own.
module fsmc_slave
  import holter_pkg::*;
#(
  parameter int unsigned AW = 10  // frame address bits (frame = 2^AW words)
) (
  input  logic             clk,
  input  logic             rst_n,
  // FSMC pins
  input  logic             fsmc_ne,
  input  logic             fsmc_noe,
  input  logic             fsmc_nwe,
  input  logic [AW:0]      fsmc_a,
  input  logic [BUS_W-1:0] fsmc_d_in,
  output logic [BUS_W-1:0] fsmc_d_out,
  output logic             fsmc_d_oe,
  // core side
  output logic             enable,       // CTRL bit 0
  output thr_t             thr [DEN_LEVELS],
  input  logic             frame_done,   // filter wrote a whole frame
  output logic             frame_ready,  // output frame waiting for the CPU
  input  logic             busy,
  input  logic             overrun,      // input sample dropped
  output logic [AW-1:0]    frame_raddr,  // output frame RAM read port
  input  sample_t          frame_rdata
);

  typedef struct packed {
    logic             ne;
    logic             nwe;
    logic [AW:0]      a;
    logic [BUS_W-1:0] d;
  } bus_s;

  bus_s s1, s2;
  logic wr_commit;
  logic ovr_flag;
  logic [BUS_W-1:0] frames;
  logic [BUS_W-1:0] reg_rd;
  logic sel_frame_q;
  logic [BUS_W-1:0] reg_rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '{ne: 1'b1, nwe: 1'b1, default: '0};
      s2 <= '{ne: 1'b1, nwe: 1'b1, default: '0};
    end else begin
      s1 <= '{ne: fsmc_ne, nwe: fsmc_nwe, a: fsmc_a, d: fsmc_d_in};
      s2 <= s1;
    end
  end

  // rising edge of NWE within the chip select: take s2's address and data
  assign wr_commit = !s2.ne && !s2.nwe && s1.nwe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable      <= 1'b0;
      thr         <= '{THR1_DEF, THR2_DEF, THR3_DEF, THR4_DEF};
      frame_ready <= 1'b0;
      ovr_flag    <= 1'b0;
      frames      <= '0;
    end else begin
      if (frame_done) begin
        frame_ready <= 1'b1;
        frames      <= frames + 1'b1;
      end
      if (overrun) ovr_flag <= 1'b1;
      if (wr_commit && !s2.a[AW]) begin
        unique case (s2.a[3:0])
          REG_CTRL: enable <= s2.d[0];
          REG_ACK: begin
            if (s2.d[0]) frame_ready <= 1'b0;
            if (s2.d[2]) ovr_flag    <= 1'b0;
          end
          REG_THR1: thr[0] <= s2.d;
          REG_THR2: thr[1] <= s2.d;
          REG_THR3: thr[2] <= s2.d;
          REG_THR4: thr[3] <= s2.d;
          default: ;
        endcase
      end
    end
  end

  // register read multiplexer
  always_comb begin
    unique case (s2.a[3:0])
      REG_CTRL:   reg_rd = {15'd0, enable};
      REG_STATUS: reg_rd = {13'd0, ovr_flag, busy, frame_ready};
      REG_FRAMES: reg_rd = frames;
      REG_THR1:   reg_rd = thr[0];
      REG_THR2:   reg_rd = thr[1];
      REG_THR3:   reg_rd = thr[2];
      REG_THR4:   reg_rd = thr[3];
      REG_ID:     reg_rd = DESIGN_ID;
      default:    reg_rd = '0;
    endcase
  end

  assign frame_raddr = s2.a[AW-1:0];

  // align the register path with the one-cycle frame RAM read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_frame_q <= 1'b0;
      reg_rd_q    <= '0;
      fsmc_d_out  <= '0;
    end else begin
      sel_frame_q <= s2.a[AW];
      reg_rd_q    <= reg_rd;
      fsmc_d_out  <= sel_frame_q ? BUS_W'(frame_rdata) : reg_rd_q;
    end
  end

  assign fsmc_d_oe = !fsmc_ne && !fsmc_noe;

endmodule
