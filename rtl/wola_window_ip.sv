// wola_window_ip -- the WOLA windowing co-processor.
//
// This is the part of the WOLA analysis filter bank that the original system
// moves out of software into hardware: weighting each frame of EEG samples by
// the analysis window h(n). It groups the three parts of the co-processor:
//   wola_window_ctrl  registers, frame/channel sequencing, DDR2 master, irq
//   wola_coef_mem     64 KB on-chip RAM holding h(n)
//   wola_weighting    LANES parallel Q1.15 multipliers
//
// Host bus: the register file and the coefficient RAM are two slaves
// (csr_* and coef_*, each addressed from 0; see ebci_pkg for the formats).
// The processor loads h(n) into the coefficient RAM once, writes an order
// into the registers, sets CTRL.start and waits for irq.
// DDR2 side: a LANES*16-bit pipelined master (see wola_window_ctrl).
// Timing: 3 cycles per LANES-sample word with a memory that never waits and
// answers reads after one cycle.
module wola_window_ip
  import ebci_pkg::*;
#(
  parameter int unsigned LANES      = 8,
  parameter int unsigned COEF_BYTES = 65536
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  host_req_t                  csr_req,
  output host_rsp_t                  csr_rsp,
  input  host_req_t                  coef_req,
  output host_rsp_t                  coef_rsp,
  output logic                       irq,
  output logic [DDR_AW-1:0]          m_address,
  output logic                       m_read,
  output logic                       m_write,
  output logic [LANES*SAMPLE_W-1:0]  m_writedata,
  input  logic [LANES*SAMPLE_W-1:0]  m_readdata,
  input  logic                       m_readdatavalid,
  input  logic                       m_waitrequest,
  output logic [LANES-1:0]           sat           // lanes saturated in the last word
);

  localparam int unsigned ROWS  = COEF_BYTES / (2 * LANES);
  localparam int unsigned ROW_W = $clog2(ROWS);

  logic                           c_rd_en;
  logic [ROW_W-1:0]               c_rd_row;
  logic [LANES-1:0][COEF_W-1:0]   c_rd_coefs;
  logic                           w_in_valid, w_out_valid;
  logic [LANES-1:0][SAMPLE_W-1:0] w_samples, w_weighted;
  logic [LANES-1:0][COEF_W-1:0]   w_coefs;

  wola_window_ctrl #(.LANES(LANES), .ROW_W(ROW_W)) u_ctrl (
    .clk, .rst_n,
    .csr_req, .csr_rsp, .irq,
    .m_address, .m_read, .m_write, .m_writedata,
    .m_readdata, .m_readdatavalid, .m_waitrequest,
    .c_rd_en, .c_rd_row, .c_rd_coefs,
    .w_in_valid, .w_samples, .w_coefs, .w_weighted
  );

  wola_coef_mem #(.LANES(LANES), .COEF_BYTES(COEF_BYTES)) u_coef (
    .clk, .rst_n,
    .host_req(coef_req), .host_rsp(coef_rsp),
    .rd_en(c_rd_en), .rd_row(c_rd_row), .rd_coefs(c_rd_coefs)
  );

  wola_weighting #(.LANES(LANES)) u_weight (
    .clk, .rst_n,
    .in_valid(w_in_valid), .samples(w_samples), .coefs(w_coefs),
    .out_valid(w_out_valid), .weighted(w_weighted), .sat
  );

  // Each weighting result is consumed by the write that follows it.
  a_out_written: assert property (@(posedge clk) disable iff (!rst_n)
    w_out_valid |-> m_write);

endmodule
