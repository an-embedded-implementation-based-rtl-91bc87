// ddr2_model -- behavioural model of the DDR2 controller port (testbench only).
//
// Answers a pipelined memory master: a request is taken in a cycle where
// read or write is set and waitrequest is low; reads return in order, each
// after a random latency of MIN_LAT..MAX_LAT cycles, on readdatavalid.
// waitrequest is raised at random in STALL_PCT percent of the cycles.
// Memory is WORDS words of DW bits, indexed by byte address / (DW/8) modulo
// WORDS; testbenches preload and inspect `mem` directly, and may change
// stall_pct, min_lat and max_lat at run time. `stalls` counts the
// requests that were held off by waitrequest.
module ddr2_model #(
  parameter int unsigned DW        = 128,
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned STALL_PCT = 20,
  parameter int unsigned MIN_LAT   = 1,
  parameter int unsigned MAX_LAT   = 4
) (
  input  logic          clk,
  input  logic [31:0]   address,
  input  logic          read,
  input  logic          write,
  input  logic [DW-1:0] writedata,
  output logic [DW-1:0] readdata,
  output logic          readdatavalid,
  output logic          waitrequest
);
  localparam int unsigned SH = $clog2(DW / 8);

  logic [DW-1:0] mem [WORDS];
  int unsigned   stalls = 0;
  int unsigned   stall_pct = STALL_PCT;   // run-time copies of the parameters
  int unsigned   min_lat   = MIN_LAT;
  int unsigned   max_lat   = MAX_LAT;
  int unsigned   reads = 0, writes = 0;
  longint unsigned now = 0;

  typedef struct { logic [DW-1:0] data; longint unsigned due; } rsp_t;
  rsp_t q[$];

  logic stall_r = 1'b0;
  assign waitrequest = stall_r;

  function automatic int unsigned idx(logic [31:0] a);
    return (a >> SH) % WORDS;
  endfunction

  always @(posedge clk) begin
    rsp_t r;
    longint unsigned due;
    now++;
    readdatavalid <= 1'b0;
    if ((read || write) && stall_r) stalls++;
    if (read && !stall_r) begin
      due = now + min_lat - 1 + ($urandom % (max_lat - min_lat + 1));
      if (q.size() > 0 && due <= q[$].due) due = q[$].due + 1;
      r.data = mem[idx(address)];
      r.due  = due;
      q.push_back(r);
      reads++;
    end
    if (write && !stall_r) begin
      mem[idx(address)] <= writedata;
      writes++;
    end
    if (q.size() > 0 && q[0].due <= now) begin
      readdata      <= q[0].data;
      readdatavalid <= 1'b1;
      void'(q.pop_front());
    end
    stall_r <= ($urandom % 100) < stall_pct;
  end
endmodule
