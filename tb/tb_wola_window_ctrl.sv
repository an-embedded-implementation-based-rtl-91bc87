// tb_wola_window_ctrl -- checks the windowing controller's order sequencing.
//
// The controller drives the real multiplier block, a coefficient-row model
// with one cycle of latency and the DDR2 model. Two orders are run:
//   A: memory without stalls and read latency 1, irq disabled: checks the
//      3-cycles-per-word timing (CYCLES = 3*K+1) and the WORDS count.
//   B: random stalls and read latency 1..4, irq enabled: checks the frame
//      overlap (hop < window), channel stride, irq and its clearing.
// Every written word is compared with the weighting of the source word the
// frame/channel arithmetic says it comes from; words past the order's end
// must stay untouched. The ordering of requests is checked by the assertions
// in the controller.
module tb_wola_window_ctrl;
  import ebci_pkg::*;
  import wola_ref_pkg::*;
  localparam int LANES = 8, ROW_W = 6, W = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  host_req_t csr_req;
  host_rsp_t csr_rsp;
  logic irq;
  logic [31:0] m_address;
  logic m_read, m_write, m_readdatavalid, m_waitrequest;
  logic [W-1:0] m_writedata, m_readdata;
  logic c_rd_en;
  logic [ROW_W-1:0] c_rd_row;
  logic [LANES-1:0][15:0] c_rd_coefs;
  logic w_in_valid, w_out_valid;
  logic [LANES-1:0][15:0] w_samples, w_coefs, w_weighted;
  logic [LANES-1:0] w_sat;
  int checks = 0, failures = 0;

  wola_window_ctrl #(.LANES(LANES), .ROW_W(ROW_W)) dut (.*);
  wola_weighting #(.LANES(LANES)) u_w (.clk, .rst_n, .in_valid(w_in_valid), .samples(w_samples),
    .coefs(w_coefs), .out_valid(w_out_valid), .weighted(w_weighted), .sat(w_sat));
  ddr2_model #(.DW(W), .WORDS(4096)) u_ddr (.clk, .address(m_address), .read(m_read), .write(m_write),
    .writedata(m_writedata), .readdata(m_readdata), .readdatavalid(m_readdatavalid),
    .waitrequest(m_waitrequest));

  logic [W-1:0] coef_rows [2**ROW_W];
  always_ff @(posedge clk) if (c_rd_en) c_rd_coefs <= coef_rows[c_rd_row];

  task automatic wr(wola_reg_e r, logic [31:0] d);
    @(negedge clk); csr_req = '0; csr_req.write = 1; csr_req.address = HOST_AW'({r, 2'b00});
    csr_req.writedata = d; csr_req.byteenable = 4'hF;
    @(negedge clk); csr_req = '0;
  endtask
  task automatic rd(wola_reg_e r, output logic [31:0] d);
    @(negedge clk); csr_req = '0; csr_req.read = 1; csr_req.address = HOST_AW'({r, 2'b00});
    @(negedge clk); csr_req = '0; d = csr_rsp.readdata;
  endtask
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  // Run one order and compare DDR contents. Word addresses are in bus words.
  task automatic run(int src, int dst, int win, int hop, int frames, int chans, int stride,
                     int crow, bit use_irq);
    logic [31:0] d;
    int k = 0, ns;
    wr(WREG_SRC, src * 16); wr(WREG_DST, dst * 16);
    wr(WREG_WIN_WORDS, win); wr(WREG_HOP_WORDS, hop); wr(WREG_FRAMES, frames);
    wr(WREG_CHANNELS, chans); wr(WREG_CH_STRIDE, stride * 16); wr(WREG_COEF_ROW, crow);
    u_ddr.mem[dst + win*frames*chans] = 128'h5A5A;    // guard word
    wr(WREG_CTRL, {30'd0, use_irq, 1'b1});
    rd(WREG_STATUS, d); check("busy after start", d[0], 1);
    if (use_irq) begin
      @(posedge irq);
      @(negedge clk);
    end else begin
      do rd(WREG_STATUS, d); while (d[0]);
      check("no irq when disabled", irq, 0);
    end
    rd(WREG_STATUS, d); check("done flag", d[1:0], 2'b10);
    rd(WREG_WORDS, d);  check("words", d, win * frames * chans);
    for (int c = 0; c < chans; c++)
      for (int m = 0; m < frames; m++)
        for (int n = 0; n < win; n++) begin
          logic [W-1:0] e;
          e = weight_word(u_ddr.mem[src + c*stride + m*hop + n], coef_rows[crow + n], ns);
          checks++;
          if (u_ddr.mem[dst + k] !== e) begin
            failures++;
            $display("FAIL ch %0d frame %0d n %0d got %h exp %h", c, m, n, u_ddr.mem[dst+k], e);
          end
          k++;
        end
    checks++;
    if (u_ddr.mem[dst + k] !== 128'h5A5A) begin failures++; $display("FAIL wrote past the end"); end
    wr(WREG_STATUS, 32'b10);
    rd(WREG_STATUS, d); check("done cleared", d[1], 0);
    check("irq cleared", irq, 0);
  endtask

  initial begin
    logic [31:0] d;
    csr_req = '0;
    for (int i = 0; i < 4096; i++) u_ddr.mem[i] = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 2**ROW_W; i++) coef_rows[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Order A: ideal memory, timing
    u_ddr.stall_pct = 0; u_ddr.min_lat = 1; u_ddr.max_lat = 1;
    run(0, 2000, 4, 1, 3, 2, 10, 5, 0);
    rd(WREG_CYCLES, d); check("cycles = 3*K+1", d, 3 * 24 + 1);
    // Order B: stalls and variable latency, overlapping frames, irq
    u_ddr.stall_pct = 30; u_ddr.min_lat = 1; u_ddr.max_lat = 4;
    run(100, 3000, 8, 2, 5, 3, 100, 17, 1);
    checks++;
    if (u_ddr.stalls == 0) begin failures++; $display("FAIL no stall happened"); end
    // Order C: start ignored while busy is covered by re-writing a register mid-order
    u_ddr.stall_pct = 0;
    wr(WREG_WIN_WORDS, 2); wr(WREG_FRAMES, 1); wr(WREG_CHANNELS, 1); wr(WREG_DST, 1000 * 16);
    wr(WREG_CTRL, 1);
    wr(WREG_WIN_WORDS, 9);                      // ignored: order running
    rd(WREG_WIN_WORDS, d); check("order registers frozen while busy", d, 2);
    do rd(WREG_STATUS, d); while (d[0]);
    rd(WREG_WORDS, d); check("short order words", d, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
