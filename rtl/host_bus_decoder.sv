// host_bus_decoder -- system interconnect from the host processor to the
// peripherals.
//
// The original system joins its parts with the FPGA vendor's standard
// memory-mapped interconnect. This design needs only one host master and
// slaves that never stall, so the interconnect reduces to an address decoder:
// each request goes to the one slave whose window (BASE, MASK) matches, with
// the address made relative to the slave's base, and the read response of the
// slave that was read one cycle earlier is returned. A read that hits no
// slave returns DEAD_VALUE so that software sees the fault.
//
// Ports: s_req/s_rsp from the host; m_req[i]/m_rsp[i] to slave i; decode_err
// pulses for a request outside every window.
// Timing: combinational toward the slaves; one cycle of read latency, as the
// slaves themselves have.
module host_bus_decoder
  import ebci_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter logic [N-1:0][HOST_AW-1:0] BASE = {TIMER_BASE, WOLA_BASE, BUF_BASE, COEF_BASE},
  parameter logic [N-1:0][HOST_AW-1:0] MASK = {TIMER_MASK, WOLA_MASK, BUF_MASK, COEF_MASK},
  parameter logic [HOST_DW-1:0]        DEAD_VALUE = 32'hDEAD_BEEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  host_req_t         s_req,
  output host_rsp_t         s_rsp,
  output host_req_t [N-1:0] m_req,
  input  host_rsp_t [N-1:0] m_rsp,
  output logic              decode_err
);

  logic [N-1:0] hit;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      hit[i]              = (s_req.address & MASK[i]) == BASE[i];
      m_req[i]            = s_req;
      m_req[i].address    = s_req.address & ~MASK[i];
      m_req[i].read       = s_req.read  & hit[i];
      m_req[i].write      = s_req.write & hit[i];
    end
  end

  assign decode_err = (s_req.read || s_req.write) && hit == '0;

  logic miss_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss_rd <= 1'b0;
    else        miss_rd <= s_req.read && hit == '0;
  end

  always_comb begin
    s_rsp = '0;
    for (int i = 0; i < N; i++)
      if (m_rsp[i].readdatavalid) s_rsp = m_rsp[i];
    if (miss_rd) begin
      s_rsp.readdata      = DEAD_VALUE;
      s_rsp.readdatavalid = 1'b1;
    end
  end

  // Windows must not overlap: at most one slave answers a request.
  a_one_hit: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit));

endmodule
