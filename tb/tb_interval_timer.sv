// tb_interval_timer -- checks the execution-time timer.
//
// Checks the reset PERIOD (10 us at 150 MHz = 1500 cycles, so 1499), then
// with a short period measures the cycles between time-outs in continuous
// mode, the TICKS count, the irq enable, flag clearing, one-shot mode and stop.
module tb_interval_timer;
  import ebci_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  host_req_t host_req;
  host_rsp_t host_rsp;
  logic irq;
  int checks = 0, failures = 0;

  interval_timer dut (.*);

  task automatic wr(timer_reg_e r, logic [31:0] d);
    @(negedge clk); host_req = '0; host_req.write = 1; host_req.address = HOST_AW'({r, 2'b00});
    host_req.writedata = d; host_req.byteenable = 4'hF;
    @(negedge clk); host_req = '0;
  endtask
  task automatic rd(timer_reg_e r, output logic [31:0] d);
    @(negedge clk); host_req = '0; host_req.read = 1; host_req.address = HOST_AW'({r, 2'b00});
    @(negedge clk); host_req = '0; d = host_rsp.readdata;
  endtask
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    int t0, t1, cyc;
    host_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(TREG_PERIOD, d); check("default period", d, 32'd1499);
    // default period, one time-out measured
    wr(TREG_CONTROL, 32'b0110);          // continuous + start
    cyc = 0;
    while (!(dut.to_flag)) begin @(negedge clk); cyc++; end
    check("10 us time-out cycles", cyc, 1500);
    wr(TREG_CONTROL, 32'b1000);          // stop
    wr(TREG_STATUS, 0); wr(TREG_TICKS, 0);
    rd(TREG_STATUS, d); check("flag cleared", d[0], 0);
    // short period, continuous, irq enabled
    wr(TREG_PERIOD, 32'd9);
    wr(TREG_CONTROL, 32'b0111);
    @(posedge irq); t0 = $time;
    wr(TREG_STATUS, 0);
    check("irq cleared by status write", irq, 0);
    @(posedge irq); t1 = $time;
    check("period 9 -> 10 cycles", (t1 - t0) / 10, 10);
    repeat (47) @(posedge clk);
    rd(TREG_TICKS, d);
    checks++;
    if (d < 6 || d > 8) begin failures++; $display("FAIL ticks %0d", d); end
    // one-shot
    wr(TREG_CONTROL, 32'b1000);
    wr(TREG_STATUS, 0); wr(TREG_TICKS, 0);
    wr(TREG_CONTROL, 32'b0100);          // start, one-shot, irq off
    repeat (40) @(posedge clk);
    rd(TREG_TICKS, d);  check("one-shot ticks", d, 1);
    rd(TREG_STATUS, d); check("one-shot stopped, flagged", d[1:0], 2'b01);
    check("irq masked", irq, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
