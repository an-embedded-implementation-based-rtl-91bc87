// wola_window_ctrl -- windowing controller of the WOLA co-processor.
//
// The host processor gives the co-processor an order: where the EEG trial is
// in DDR2, where the weighted frames must go, and the shape of the analysis
// (window length La, decimation factor R, number of frames and channels). The
// controller then fetches the samples itself over its DDR2 master port,
// multiplies them by the window h(n) held in the coefficient RAM, writes the
// weighted frames back to DDR2 and raises an interrupt so that the processor
// can run the rest of the WOLA filter (time folding, FFT, band selection,
// synthesis) in software. Fetching the data, weighting it and interrupting
// the processor follow the original system; the register set and the frame
// loop below are this design's.
//
// Work done by one order, with W = WIN_WORDS, H = HOP_WORDS, B = 2*LANES bytes
// per bus word:
//   for ch < CHANNELS, for m < FRAMES, for n < W:
//     DST[k++] = weight(SRC[ch*CH_STRIDE + (m*H + n)*B], h-row COEF_ROW + n)
// so frame m is the La samples starting at sample m*R of the channel, each
// multiplied by h(0..La-1). La and R are multiples of LANES.
//
// Ports: csr_req/csr_rsp is the register slave on the host bus (offsets in
// ebci_pkg::wola_reg_e); m_* is a pipelined memory master (held request while
// m_waitrequest, read data on m_readdatavalid, any read latency); c_* reads
// the coefficient RAM (one-cycle latency); w_* drives the weighting
// multipliers (one-cycle latency); irq is level, cleared by writing 1 to
// STATUS.done.
// Timing: one word in flight at a time. With a memory that never waits and
// answers reads after one cycle, a word takes 3 cycles (read request, read
// data, write), and an order of K words takes 3*K+1 cycles counted in the
// CYCLES register.
module wola_window_ctrl
  import ebci_pkg::*;
#(
  parameter int unsigned LANES = 8,
  parameter int unsigned ROW_W = 12
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // register slave
  input  host_req_t                       csr_req,
  output host_rsp_t                       csr_rsp,
  output logic                            irq,
  // DDR2 master
  output logic [DDR_AW-1:0]               m_address,
  output logic                            m_read,
  output logic                            m_write,
  output logic [LANES*SAMPLE_W-1:0]       m_writedata,
  input  logic [LANES*SAMPLE_W-1:0]       m_readdata,
  input  logic                            m_readdatavalid,
  input  logic                            m_waitrequest,
  // coefficient RAM read port
  output logic                            c_rd_en,
  output logic [ROW_W-1:0]                c_rd_row,
  input  logic [LANES-1:0][COEF_W-1:0]    c_rd_coefs,
  // weighting multipliers
  output logic                            w_in_valid,
  output logic [LANES-1:0][SAMPLE_W-1:0]  w_samples,
  output logic [LANES-1:0][COEF_W-1:0]    w_coefs,
  input  logic [LANES-1:0][SAMPLE_W-1:0]  w_weighted
);

  localparam int unsigned BYTE_SH = $clog2(2 * LANES);   // log2 bytes per word

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RWAIT, S_WR, S_DONE} state_e;
  state_e state;

  // Order registers.
  logic [31:0] r_src, r_dst, r_win, r_hop, r_frames, r_channels, r_stride, r_coef_row;
  logic        r_irq_en, r_done;
  logic [31:0] r_cycles, r_words;

  // Loop state.
  logic [31:0] n, frame, ch;
  logic [DDR_AW-1:0] src_ptr, frame_ptr, ch_ptr, dst_ptr;
  logic [DDR_AW-1:0] hop_bytes, word_bytes;
  assign hop_bytes  = DDR_AW'(r_hop) << BYTE_SH;
  assign word_bytes = DDR_AW'(1) << BYTE_SH;

  // Register access.
  wola_reg_e reg_sel;
  assign reg_sel = wola_reg_e'(csr_req.address[7:2]);
  logic start;
  assign start = csr_req.write && reg_sel == WREG_CTRL && csr_req.writedata[0]
              && state == S_IDLE;
  logic busy;
  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_src <= '0; r_dst <= '0; r_win <= '0; r_hop <= '0; r_frames <= '0;
      r_channels <= '0; r_stride <= '0; r_coef_row <= '0; r_irq_en <= 1'b0;
    end else if (csr_req.write && !busy) begin
      // Order registers are frozen while an order runs.
      unique case (reg_sel)
        WREG_CTRL:      r_irq_en   <= csr_req.writedata[1];
        WREG_SRC:       r_src      <= csr_req.writedata;
        WREG_DST:       r_dst      <= csr_req.writedata;
        WREG_WIN_WORDS: r_win      <= csr_req.writedata;
        WREG_HOP_WORDS: r_hop      <= csr_req.writedata;
        WREG_FRAMES:    r_frames   <= csr_req.writedata;
        WREG_CHANNELS:  r_channels <= csr_req.writedata;
        WREG_CH_STRIDE: r_stride   <= csr_req.writedata;
        WREG_COEF_ROW:  r_coef_row <= csr_req.writedata;
        default: ;
      endcase
    end else if (csr_req.write && reg_sel == WREG_CTRL) begin
      r_irq_en <= csr_req.writedata[1];
    end
  end

  logic [HOST_DW-1:0] rdata;
  always_ff @(posedge clk) begin
    if (csr_req.read) begin
      unique case (reg_sel)
        WREG_CTRL:      rdata <= {30'd0, r_irq_en, 1'b0};
        WREG_STATUS:    rdata <= {30'd0, r_done, busy};
        WREG_SRC:       rdata <= r_src;
        WREG_DST:       rdata <= r_dst;
        WREG_WIN_WORDS: rdata <= r_win;
        WREG_HOP_WORDS: rdata <= r_hop;
        WREG_FRAMES:    rdata <= r_frames;
        WREG_CHANNELS:  rdata <= r_channels;
        WREG_CH_STRIDE: rdata <= r_stride;
        WREG_COEF_ROW:  rdata <= r_coef_row;
        WREG_CYCLES:    rdata <= r_cycles;
        WREG_WORDS:     rdata <= r_words;
        default:        rdata <= '0;
      endcase
    end
  end
  logic rvalid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= csr_req.read;
  end
  assign csr_rsp.readdata      = rdata;
  assign csr_rsp.readdatavalid = rvalid;

  // Order sequencer.
  logic last_n, last_frame, last_ch;
  assign last_n     = n + 1 >= r_win;
  assign last_frame = frame + 1 >= r_frames;
  assign last_ch    = ch + 1 >= r_channels;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      n         <= '0;
      frame     <= '0;
      ch        <= '0;
      src_ptr   <= '0;
      frame_ptr <= '0;
      ch_ptr    <= '0;
      dst_ptr   <= '0;
      r_done    <= 1'b0;
      r_cycles  <= '0;
      r_words   <= '0;
    end else begin
      if (csr_req.write && reg_sel == WREG_STATUS && csr_req.writedata[1])
        r_done <= 1'b0;
      if (busy) r_cycles <= r_cycles + 1;

      unique case (state)
        S_IDLE: if (start) begin
          // An empty order finishes at once.
          state     <= (r_win == 0 || r_frames == 0 || r_channels == 0) ? S_DONE : S_RD;
          n         <= '0;
          frame     <= '0;
          ch        <= '0;
          src_ptr   <= r_src;
          frame_ptr <= r_src;
          ch_ptr    <= r_src;
          dst_ptr   <= r_dst;
          r_done    <= 1'b0;
          r_cycles  <= '0;
          r_words   <= '0;
        end
        S_RD:    if (!m_waitrequest) state <= S_RWAIT;
        S_RWAIT: if (m_readdatavalid) state <= S_WR;
        S_WR: if (!m_waitrequest) begin
          dst_ptr <= dst_ptr + word_bytes;
          r_words <= r_words + 1;
          state   <= S_RD;
          if (!last_n) begin
            n       <= n + 1;
            src_ptr <= src_ptr + word_bytes;
          end else begin
            n <= '0;
            if (!last_frame) begin
              frame     <= frame + 1;
              frame_ptr <= frame_ptr + hop_bytes;
              src_ptr   <= frame_ptr + hop_bytes;
            end else begin
              frame <= '0;
              if (!last_ch) begin
                ch        <= ch + 1;
                ch_ptr    <= ch_ptr + DDR_AW'(r_stride);
                frame_ptr <= ch_ptr + DDR_AW'(r_stride);
                src_ptr   <= ch_ptr + DDR_AW'(r_stride);
              end else begin
                state <= S_DONE;
              end
            end
          end
        end
        S_DONE: begin
          r_done <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign irq = r_done & r_irq_en;

  // Memory master.
  assign m_read      = state == S_RD;
  assign m_write     = state == S_WR;
  assign m_address   = state == S_WR ? dst_ptr : src_ptr;
  assign m_writedata = w_weighted;

  // The coefficient row is read while the sample read is outstanding, so it
  // is ready when the sample arrives.
  assign c_rd_en  = state == S_RD;
  assign c_rd_row = ROW_W'(r_coef_row + n);

  assign w_in_valid = state == S_RWAIT && m_readdatavalid;
  assign w_samples  = m_readdata;
  assign w_coefs    = c_rd_coefs;

  // Master rules: a request is held unchanged while the slave waits, and a
  // read and a write are never requested together.
  a_hold_read: assert property (@(posedge clk) disable iff (!rst_n)
    m_read && m_waitrequest |=> m_read && $stable(m_address));
  a_hold_write: assert property (@(posedge clk) disable iff (!rst_n)
    m_write && m_waitrequest |=> m_write && $stable(m_address) && $stable(m_writedata));
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) !(m_read && m_write));

endmodule
