// onchip_buffer -- the 4 KB on-chip staging memory of the BCI system.
//
// The original system holds a 4 KB on-chip memory used to stage transfers
// between a source and a destination. It is a plain 32-bit RAM on the host
// bus with byte enables; reads answer one cycle later. The size follows the
// original system; the interface is this design's.
module onchip_buffer
  import ebci_pkg::*;
#(
  parameter int unsigned BYTES = 4096,
  localparam int unsigned WORDS = BYTES / 4,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  host_req_t host_req,
  output host_rsp_t host_rsp
);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] widx;
  assign widx = host_req.address[AW+1:2];

  always_ff @(posedge clk) begin
    if (host_req.write)
      for (int b = 0; b < 4; b++)
        if (host_req.byteenable[b]) mem[widx][b*8 +: 8] <= host_req.writedata[b*8 +: 8];
  end

  logic [31:0] rdata;
  logic        rvalid;
  always_ff @(posedge clk) begin
    if (host_req.read) rdata <= mem[widx];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= host_req.read;
  end
  assign host_rsp.readdata      = rdata;
  assign host_rsp.readdatavalid = rvalid;

endmodule
