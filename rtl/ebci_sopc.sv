// ebci_sopc -- hardware layer of the embedded brain-computer interface.
//
// The system classifies motor-imagery EEG trials (left/right hand) with a
// hardware/software split: a soft processor runs the EEG chain in software
// (WOLA analysis FFT, subject-specific band selection, WOLA synthesis, common
// spatial patterns, linear discriminant), and the one step moved into
// hardware is the windowing of the WOLA analysis filter bank. This module is
// everything of that hardware layer that is not a vendor block:
//   host_bus_decoder  host bus to the peripherals below
//   wola_window_ip    windowing co-processor (registers, 64 KB h(n) RAM,
//                     LANES parallel multipliers, DDR2 master, irq)
//   onchip_buffer     4 KB on-chip staging RAM
//   interval_timer    32-bit timer with a 10 us time-out, for execution time
// The processor, the DDR2 controller, the clock PLL and the debug UART are
// vendor parts and stay outside: the processor's data master enters as
// host_req/host_rsp, the DDR2 controller's port leaves as ddr_*, and the
// interrupt lines leave as irq_wola and irq_timer.
//
// Host address map (ebci_pkg): 0x00000 h(n) RAM, 0x10000 buffer,
// 0x11000 windowing registers, 0x11100 timer. Reads answer after one cycle;
// the host bus never stalls. The DDR2 port is a pipelined master of
// LANES*16 bits (EEG samples stored as 16-bit words, as in the original).
module ebci_sopc
  import ebci_pkg::*;
#(
  parameter int unsigned LANES      = 8,
  parameter int unsigned COEF_BYTES = 65536,
  parameter int unsigned BUF_BYTES  = 4096,
  parameter int unsigned CLK_HZ     = 150_000_000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host processor data master
  input  host_req_t                  host_req,
  output host_rsp_t                  host_rsp,
  output logic                       host_decode_err,
  // interrupts to the host processor
  output logic                       irq_wola,
  output logic                       irq_timer,
  // DDR2 controller port
  output logic [DDR_AW-1:0]          ddr_address,
  output logic                       ddr_read,
  output logic                       ddr_write,
  output logic [LANES*SAMPLE_W-1:0]  ddr_writedata,
  input  logic [LANES*SAMPLE_W-1:0]  ddr_readdata,
  input  logic                       ddr_readdatavalid,
  input  logic                       ddr_waitrequest,
  // windowing status
  output logic [LANES-1:0]           wola_sat
);

  localparam int unsigned S_COEF = 0, S_BUF = 1, S_WOLA = 2, S_TIMER = 3;

  host_req_t [3:0] sreq;
  host_rsp_t [3:0] srsp;

  host_bus_decoder #(.N(4)) u_bus (
    .clk, .rst_n,
    .s_req(host_req), .s_rsp(host_rsp),
    .m_req(sreq), .m_rsp(srsp),
    .decode_err(host_decode_err)
  );

  wola_window_ip #(.LANES(LANES), .COEF_BYTES(COEF_BYTES)) u_wola (
    .clk, .rst_n,
    .csr_req(sreq[S_WOLA]),  .csr_rsp(srsp[S_WOLA]),
    .coef_req(sreq[S_COEF]), .coef_rsp(srsp[S_COEF]),
    .irq(irq_wola),
    .m_address(ddr_address), .m_read(ddr_read), .m_write(ddr_write),
    .m_writedata(ddr_writedata), .m_readdata(ddr_readdata),
    .m_readdatavalid(ddr_readdatavalid), .m_waitrequest(ddr_waitrequest),
    .sat(wola_sat)
  );

  onchip_buffer #(.BYTES(BUF_BYTES)) u_buf (
    .clk, .rst_n,
    .host_req(sreq[S_BUF]), .host_rsp(srsp[S_BUF])
  );

  interval_timer #(.CLK_HZ(CLK_HZ)) u_timer (
    .clk, .rst_n,
    .host_req(sreq[S_TIMER]), .host_rsp(srsp[S_TIMER]),
    .irq(irq_timer)
  );

endmodule
