// interval_timer -- the execution-time timer of the BCI system.
//
// The original system measures how long each processing stage takes with a
// 32-bit timer whose time-out period is 10 us. Here a 32-bit down-counter
// reloads from PERIOD and flags a time-out every PERIOD+1 cycles; the default
// PERIOD gives 10 us at the 150 MHz system clock. A 32-bit TICKS register
// counts the time-outs since the timer was started, so software reads elapsed
// time in 10 us units. The register layout is this design's.
//
// Registers (word offsets, ebci_pkg::timer_reg_e):
//   STATUS  [0] timeout flag (any write clears), [1] running
//   CONTROL [0] irq enable, [1] continuous (reload after a time-out instead of
//           stopping), [2] start (write 1: load PERIOD and run), [3] stop
//   PERIOD  reload value;  COUNT  current count;  TICKS  time-outs (write clears)
// irq = timeout flag & irq enable. Reads answer one cycle later.
module interval_timer
  import ebci_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 150_000_000,
  parameter int unsigned TIMEOUT_NS = 10_000,
  localparam logic [31:0] PERIOD_DEFAULT =
    32'(longint'(CLK_HZ) * longint'(TIMEOUT_NS) / 64'd1_000_000_000 - 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  host_req_t host_req,
  output host_rsp_t host_rsp,
  output logic      irq
);

  logic [31:0] period, count, ticks;
  logic        running, to_flag, ito, cont;

  timer_reg_e reg_sel;
  assign reg_sel = timer_reg_e'(host_req.address[4:2]);
  logic wr_ctrl;
  assign wr_ctrl = host_req.write && reg_sel == TREG_CONTROL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period  <= PERIOD_DEFAULT;
      count   <= PERIOD_DEFAULT;
      ticks   <= '0;
      running <= 1'b0;
      to_flag <= 1'b0;
      ito     <= 1'b0;
      cont    <= 1'b0;
    end else begin
      if (running) begin
        if (count == 0) begin
          to_flag <= 1'b1;
          ticks   <= ticks + 1;
          count   <= period;
          if (!cont) running <= 1'b0;
        end else begin
          count <= count - 1;
        end
      end
      if (host_req.write && reg_sel == TREG_STATUS) to_flag <= 1'b0;
      if (host_req.write && reg_sel == TREG_PERIOD) period <= host_req.writedata;
      if (host_req.write && reg_sel == TREG_TICKS)  ticks <= '0;
      if (wr_ctrl) begin
        ito  <= host_req.writedata[0];
        cont <= host_req.writedata[1];
        if (host_req.writedata[2]) begin
          running <= 1'b1;
          count   <= period;
        end
        if (host_req.writedata[3]) running <= 1'b0;
      end
    end
  end

  assign irq = to_flag & ito;

  logic [31:0] rdata;
  logic        rvalid;
  always_ff @(posedge clk) begin
    if (host_req.read) begin
      unique case (reg_sel)
        TREG_STATUS:  rdata <= {30'd0, running, to_flag};
        TREG_CONTROL: rdata <= {30'd0, cont, ito};
        TREG_PERIOD:  rdata <= period;
        TREG_COUNT:   rdata <= count;
        TREG_TICKS:   rdata <= ticks;
        default:      rdata <= '0;
      endcase
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= host_req.read;
  end
  assign host_rsp.readdata      = rdata;
  assign host_rsp.readdatavalid = rvalid;

endmodule
