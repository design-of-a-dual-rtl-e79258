// swt_wtse_filter -- frame-based ECG de-noising filter: stationary Haar
// wavelet transform (SWT) with baseline removal by wavelet scale-factor
// estimation (WTSE) and soft-threshold de-noising.
//
// When the input double buffer reports a full frame of N samples x[n], the
// sequencer makes 17 passes over the frame, one sample per clock each:
//   1-8   eight-level decomposition A_{j+1}[n] = (A_j[n] + A_j[n-2^j]) / 2,
//         A_0 = x. Only the approximations are kept; A_8 (a moving average
//         over 256 samples) is the estimate of the low-frequency noise.
//   9     WTSE: c[n] = x[n] - A_8[n+128] removes the baseline drift. The
//         cascade of eight causal averages delays A_8 by 127.5 samples;
//         reading it 128 samples ahead centres the estimate on x[n], so a
//         slow wander is cancelled instead of left with a phase error.
//         The input bank is released after this pass.
//   10-13 four-level decomposition of c; the details D_1..D_4 go to the
//         detail stores RAM1-RAM4, the approximation to the work RAMs.
//   14-17 four-level reconstruction
//         A_j[n] = (A_{j+1}[n] + T(D_{j+1}[n]) + A_{j+1}[n+2^j] - T(D_{j+1}[n+2^j])) / 2
//         with soft threshold T of level j+1 (thr[j]). The last pass
//         writes y = A_0 into the output RAM and waits first, if needed,
//         until out_free says the previous output frame has been taken.
// Indices wrap around inside the frame (periodic extension), as is usual
// for a block SWT. Two work RAMs W0/W1 hold the approximation of the
// current level and receive that of the next, alternately.
//
// Timing: each pass takes N+1 clocks (N reads, one to drain the one-stage
// read pipeline), so a frame takes 17*(N+1) clocks plus the hand-shakes.
// out_we/out_addr/out_data form a plain RAM write port; out_done pulses
// once the whole output frame is written.
//
// From the document: Haar wavelet, up-sampled (a trous) filters, eight
// decomposition levels before WTSE, four levels of decomposition and
// reconstruction afterwards, RAM1-RAM4 for the details, two input buffers.
// This design's own choices: the 1/2 filter scale, subtraction of the
// delay-compensated A_8 as the WTSE step, soft thresholding, the frame
// length and the periodic extension.
module swt_wtse_filter
  import holter_pkg::*;
#(
  parameter int unsigned N = 1024,  // frame length, power of two
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input double buffer, read side
  input  logic          in_valid,
  output logic [AW-1:0] in_addr0,
  output logic [AW-1:0] in_addr1,
  input  adc_word_t     in_data0,
  input  adc_word_t     in_data1,
  output logic          in_release,
  // soft thresholds of detail levels 1..4
  input  thr_t          thr [DEN_LEVELS],
  // output frame RAM, write side
  input  logic          out_free,
  output logic          out_we,
  output logic [AW-1:0] out_addr,
  output sample_t       out_data,
  output logic          out_done,
  output logic          busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_FLUSH, ST_WAIT_OUT} state_e;
  typedef enum logic [1:0] {P_BASE, P_WTSE, P_DEN, P_REC} pass_e;

  state_e        state;
  pass_e         pass;
  logic [2:0]    lvl;      // level index j of the current pass (0-based)
  logic [AW-1:0] n;        // sample index being read
  logic [AW-1:0] n1;       // sample index being written
  logic          v1;       // a write is due this cycle
  logic [AW-1:0] shift;    // 2^lvl

  assign shift = AW'(1) << lvl;
  assign busy  = (state != ST_IDLE);

  // ---------------------------------------------------------------------
  // Sequencer
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      pass       <= P_BASE;
      lvl        <= '0;
      n          <= '0;
      n1         <= '0;
      v1         <= 1'b0;
      in_release <= 1'b0;
      out_done   <= 1'b0;
    end else begin
      in_release <= 1'b0;
      out_done   <= 1'b0;
      n1         <= n;
      v1         <= (state == ST_RUN);
      unique case (state)
        ST_IDLE: begin
          if (in_valid) begin
            pass  <= P_BASE;
            lvl   <= '0;
            n     <= '0;
            state <= ST_RUN;
          end
        end
        ST_RUN: begin
          if (n == AW'(N - 1)) state <= ST_FLUSH;
          else                 n     <= n + 1'b1;
        end
        ST_FLUSH: begin
          n     <= '0;
          state <= ST_RUN;
          unique case (pass)
            P_BASE: begin
              if (lvl == 3'(BASE_LEVELS - 1)) pass <= P_WTSE;
              else                            lvl  <= lvl + 1'b1;
            end
            P_WTSE: begin
              in_release <= 1'b1;
              pass       <= P_DEN;
              lvl        <= '0;
            end
            P_DEN: begin
              if (lvl == 3'(DEN_LEVELS - 1)) pass <= P_REC;
              else                           lvl  <= lvl + 1'b1;
            end
            P_REC: begin
              if (lvl == 3'd1) begin
                lvl   <= '0;
                state <= out_free ? ST_RUN : ST_WAIT_OUT;
              end else if (lvl == 3'd0) begin
                out_done <= 1'b1;
                state    <= ST_IDLE;
              end else begin
                lvl <= lvl - 1'b1;
              end
            end
            default: ;
          endcase
        end
        ST_WAIT_OUT: begin
          if (out_free) state <= ST_RUN;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------------
  // Memories: all read ports share the two addresses
  // ---------------------------------------------------------------------
  logic [AW-1:0] ra0, ra1;
  assign ra0      = n;
  // analysis looks back 2^j; synthesis, and the WTSE pass (lvl is still 7
  // there, so n + 128), look ahead
  assign ra1      = (pass == P_REC || pass == P_WTSE) ? n + shift : n - shift;
  assign in_addr0 = ra0;
  assign in_addr1 = ra1;

  sample_t w_q0 [2];
  sample_t w_q1 [2];
  logic    w_we [2];
  sample_t w_wd [2];

  sample_t d_q0 [DEN_LEVELS];
  sample_t d_q1 [DEN_LEVELS];
  logic    d_we [DEN_LEVELS];
  sample_t d_wd;

  for (genvar i = 0; i < 2; i++) begin : g_work
    sdp_ram #(.WIDTH(DW), .DEPTH(N)) u_w (
      .clk (clk), .we (w_we[i]), .waddr (n1), .wdata (w_wd[i]),
      .raddr0 (ra0), .rdata0 (w_q0[i]), .raddr1 (ra1), .rdata1 (w_q1[i])
    );
  end

  // RAM1..RAM4: detail coefficients of the four-level decomposition
  for (genvar i = 0; i < DEN_LEVELS; i++) begin : g_detail
    sdp_ram #(.WIDTH(DW), .DEPTH(N)) u_d (
      .clk (clk), .we (d_we[i]), .waddr (n1), .wdata (d_wd),
      .raddr0 (ra0), .rdata0 (d_q0[i]), .raddr1 (ra1), .rdata1 (d_q1[i])
    );
  end

  // ---------------------------------------------------------------------
  // Datapath (write stage)
  // ---------------------------------------------------------------------
  logic    src_sel;             // work RAM holding the source approximation
  sample_t x0, x1;              // input frame, as signed samples
  sample_t src0, src1;
  sample_t an_a, an_d, syn_y;
  sample_t det0, det1;
  thr_t    thr_l;

  assign x0 = sample_t'(in_data0);
  assign x1 = sample_t'(in_data1);

  always_comb begin
    unique case (pass)
      P_BASE:  src_sel = ~lvl[0];
      P_DEN:   src_sel =  lvl[0];
      P_REC:   src_sel = ~lvl[0];
      default: src_sel = 1'b1;
    endcase
  end

  always_comb begin
    if (pass == P_BASE && lvl == '0) begin
      src0 = x0;
      src1 = x1;
    end else begin
      src0 = w_q0[src_sel];
      src1 = w_q1[src_sel];
    end
    det0  = d_q0[lvl[1:0]];
    det1  = d_q1[lvl[1:0]];
    thr_l = thr[lvl[1:0]];
  end

  haar_analysis u_an (.a(src0), .b(src1), .approx(an_a), .detail(an_d));

  haar_synthesis u_syn (
    .a0(src0), .d0(det0), .a1(src1), .d1(det1), .thr(thr_l), .y(syn_y)
  );

  always_comb begin
    w_we     = '{default: 1'b0};
    w_wd     = '{default: '0};
    d_we     = '{default: 1'b0};
    d_wd     = an_d;
    out_we   = 1'b0;
    out_addr = n1;
    out_data = syn_y;
    if (v1) begin
      unique case (pass)
        P_BASE: begin
          w_we[lvl[0]] = 1'b1;
          w_wd[lvl[0]] = an_a;
        end
        P_WTSE: begin  // c[n] = x[n] - A_8[n+128] (A_8 is in W1)
          w_we[0] = 1'b1;
          w_wd[0] = x0 - w_q1[1];
        end
        P_DEN: begin
          w_we[~lvl[0]]   = 1'b1;
          w_wd[~lvl[0]]   = an_a;
          d_we[lvl[1:0]]  = 1'b1;
        end
        P_REC: begin
          if (lvl == '0) begin
            out_we = 1'b1;
          end else begin
            w_we[lvl[0]] = 1'b1;
            w_wd[lvl[0]] = syn_y;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
