// ebci_pkg -- types and constants shared by the embedded BCI hardware layer.
//
// The hardware layer is a small system on chip: a host processor reaches every
// peripheral through one 32-bit memory-mapped bus, and the WOLA windowing
// co-processor reaches the EEG data held in external DDR2 memory through its
// own wide master port. This package holds the host-bus request/response
// structs, the system address map and the number formats.
//
// Host bus convention (this design's choice, the bus of the original system is
// a vendor interconnect): a request is a single cycle with `read` or `write`
// set; every slave answers a read exactly one cycle later with `readdatavalid`
// and never stalls. Addresses are byte addresses; `address[1:0]` is ignored.
//
// Number formats: EEG samples are 16-bit two's complement (the 16-bit storage
// format follows the original system); window coefficients are 16-bit Q1.15
// (this design's choice).
package ebci_pkg;

  localparam int unsigned HOST_AW = 20;   // host byte-address width
  localparam int unsigned HOST_DW = 32;   // host data width

  localparam int unsigned SAMPLE_W  = 16;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 15; // Q1.15 coefficients

  localparam int unsigned DDR_AW = 32;    // byte address toward DDR2

  typedef struct packed {
    logic [HOST_AW-1:0]   address;
    logic                 read;
    logic                 write;
    logic [HOST_DW-1:0]   writedata;
    logic [HOST_DW/8-1:0] byteenable;
  } host_req_t;

  typedef struct packed {
    logic [HOST_DW-1:0] readdata;
    logic               readdatavalid;
  } host_rsp_t;

  // System address map (byte addresses on the host bus).
  localparam logic [HOST_AW-1:0] COEF_BASE  = 20'h00000; // 64 KB coefficient RAM
  localparam logic [HOST_AW-1:0] COEF_MASK  = 20'hF0000;
  localparam logic [HOST_AW-1:0] BUF_BASE   = 20'h10000; // 4 KB on-chip buffer
  localparam logic [HOST_AW-1:0] BUF_MASK   = 20'hFF000;
  localparam logic [HOST_AW-1:0] WOLA_BASE  = 20'h11000; // windowing IP registers
  localparam logic [HOST_AW-1:0] WOLA_MASK  = 20'hFFF00;
  localparam logic [HOST_AW-1:0] TIMER_BASE = 20'h11100; // interval timer registers
  localparam logic [HOST_AW-1:0] TIMER_MASK = 20'hFFF00;

  // Windowing IP register word offsets (address[7:2]).
  typedef enum logic [5:0] {
    WREG_CTRL      = 6'd0,  // [0] start (write 1), [1] irq enable
    WREG_STATUS    = 6'd1,  // [0] busy, [1] done (write 1 to clear)
    WREG_SRC       = 6'd2,  // byte address of channel 0, sample 0
    WREG_DST       = 6'd3,  // byte address of the first weighted word
    WREG_WIN_WORDS = 6'd4,  // window length La in bus words
    WREG_HOP_WORDS = 6'd5,  // decimation factor R in bus words
    WREG_FRAMES    = 6'd6,  // frames per channel
    WREG_CHANNELS  = 6'd7,  // channels per order
    WREG_CH_STRIDE = 6'd8,  // byte distance between channels in the source
    WREG_COEF_ROW  = 6'd9,  // first coefficient row of h(n)
    WREG_CYCLES    = 6'd10, // clock cycles taken by the last order
    WREG_WORDS     = 6'd11  // words written by the last order
  } wola_reg_e;

  // Interval timer register word offsets (address[4:2]).
  typedef enum logic [2:0] {
    TREG_STATUS  = 3'd0,  // [0] timeout (write clears), [1] running
    TREG_CONTROL = 3'd1,  // [0] irq enable, [1] continuous, [2] start, [3] stop
    TREG_PERIOD  = 3'd2,  // timeout every PERIOD+1 cycles
    TREG_COUNT   = 3'd3,  // current down-count
    TREG_TICKS   = 3'd4   // timeouts since start (write clears)
  } timer_reg_e;

endpackage
