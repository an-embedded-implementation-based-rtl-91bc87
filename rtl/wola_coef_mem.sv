// wola_coef_mem -- on-chip RAM holding the WOLA analysis window h(n).
//
// The original system keeps the window coefficients in a 64 KB on-chip memory
// inside the FPGA so that the windowing co-processor never waits on external
// memory for them; that size is the default here. The RAM is split into LANES
// banks of 16-bit words, coefficient c living in bank c % LANES at row
// c / LANES, so that one row delivers the LANES coefficients the weighting
// multipliers need in the same cycle (the bank organisation is this design's
// choice).
//
// Ports
//   host_req/host_rsp  32-bit host port, byte-addressed from 0; one 32-bit word
//                      holds two consecutive coefficients (low half first).
//                      Byte enables are honoured. Reads answer one cycle later.
//   rd_en/rd_row       datapath read of one row; rd_coefs is valid the cycle
//                      after rd_en and holds until the next rd_en.
// Timing: both ports are synchronous with one cycle of read latency; a host
// write and a datapath read of the same row in the same cycle return the old
// data on the datapath port.
module wola_coef_mem
  import ebci_pkg::*;
#(
  parameter int unsigned LANES      = 8,
  parameter int unsigned COEF_BYTES = 65536,
  localparam int unsigned ROWS      = COEF_BYTES / (2 * LANES),
  localparam int unsigned ROW_W     = $clog2(ROWS)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  host_req_t                       host_req,
  output host_rsp_t                       host_rsp,
  input  logic                            rd_en,
  input  logic [ROW_W-1:0]                rd_row,
  output logic [LANES-1:0][COEF_W-1:0]    rd_coefs
);

  localparam int unsigned PAIRS  = LANES / 2;          // 32-bit host words per row
  localparam int unsigned PAIR_W = $clog2(PAIRS);

  initial begin
    assert (LANES >= 4 && (LANES & (LANES - 1)) == 0)
      else $fatal(1, "LANES must be a power of two, at least 4");
  end

  // Host word index -> row and pair of banks.
  logic [ROW_W+PAIR_W-1:0] hword;
  logic [ROW_W-1:0]        hrow;
  logic [PAIR_W-1:0]       hpair;
  assign hword = host_req.address[ROW_W+PAIR_W+1:2];
  assign hrow  = hword[ROW_W+PAIR_W-1:PAIR_W];
  assign hpair = hword[PAIR_W-1:0];

  // One RAM per lane; each has a write port shared by the host, a host read
  // port and a datapath read port.
  logic [LANES-1:0][COEF_W-1:0] hread;   // row hrow of every bank, registered

  for (genvar b = 0; b < LANES; b++) begin : g_bank
    logic [COEF_W-1:0] ram [ROWS];
    logic              sel;
    logic [1:0]        be;
    assign sel = host_req.write && hpair == PAIR_W'(b / 2);
    assign be  = host_req.byteenable[(b % 2) * 2 +: 2];

    always_ff @(posedge clk) begin
      if (sel && be[0]) ram[hrow][7:0]  <= host_req.writedata[(b % 2) * 16 +: 8];
      if (sel && be[1]) ram[hrow][15:8] <= host_req.writedata[(b % 2) * 16 + 8 +: 8];
    end
    always_ff @(posedge clk) begin
      if (host_req.read) hread[b] <= ram[hrow];
    end
    always_ff @(posedge clk) begin
      if (rd_en) rd_coefs[b] <= ram[rd_row];
    end
  end

  // Host read: pick the bank pair of the word read in the previous cycle.
  logic [PAIR_W-1:0] hpair_q;
  always_ff @(posedge clk) begin
    if (host_req.read) hpair_q <= hpair;
  end

  logic hvalid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hvalid <= 1'b0;
    else        hvalid <= host_req.read;
  end
  assign host_rsp.readdata      = {hread[2*hpair_q+1], hread[2*hpair_q]};
  assign host_rsp.readdatavalid = hvalid;

endmodule
