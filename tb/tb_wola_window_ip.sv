// tb_wola_window_ip -- checks the assembled windowing co-processor.
//
// Loads a window h(n) through the coefficient port exactly as software would
// (two Q1.15 coefficients per 32-bit write), reads part of it back, plants
// full-scale negative samples and coefficients to force a saturation, and runs
// two orders against the DDR2 model with random stalls and read latency,
// waiting on irq. Every weighted word is compared with the reference
// weighting of its source word.
module tb_wola_window_ip;
  import ebci_pkg::*;
  import wola_ref_pkg::*;
  localparam int LANES = 8, W = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  host_req_t csr_req, coef_req;
  host_rsp_t csr_rsp, coef_rsp;
  logic irq;
  logic [31:0] m_address;
  logic m_read, m_write, m_readdatavalid, m_waitrequest;
  logic [W-1:0] m_writedata, m_readdata;
  logic [LANES-1:0] sat;
  int checks = 0, failures = 0, sat_seen = 0;

  wola_window_ip dut (.*);
  ddr2_model #(.DW(W), .WORDS(8192), .STALL_PCT(25), .MIN_LAT(1), .MAX_LAT(5)) u_ddr (
    .clk, .address(m_address), .read(m_read), .write(m_write), .writedata(m_writedata),
    .readdata(m_readdata), .readdatavalid(m_readdatavalid), .waitrequest(m_waitrequest));

  always @(posedge clk) if (sat != 0 && m_write && !m_waitrequest) sat_seen++;

  logic [15:0] h [1024];

  task automatic wr(wola_reg_e r, logic [31:0] d);
    @(negedge clk); csr_req = '0; csr_req.write = 1; csr_req.address = HOST_AW'({r, 2'b00});
    csr_req.writedata = d; csr_req.byteenable = 4'hF;
    @(negedge clk); csr_req = '0;
  endtask
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  function automatic logic [W-1:0] hrow(int r);
    logic [W-1:0] v;
    for (int l = 0; l < LANES; l++) v[l*16 +: 16] = h[r*LANES + l];
    return v;
  endfunction

  task automatic order(int src, int dst, int win, int hop, int frames, int chans, int stride, int crow);
    int k = 0, ns;
    wr(WREG_SRC, src * 16); wr(WREG_DST, dst * 16);
    wr(WREG_WIN_WORDS, win); wr(WREG_HOP_WORDS, hop); wr(WREG_FRAMES, frames);
    wr(WREG_CHANNELS, chans); wr(WREG_CH_STRIDE, stride * 16); wr(WREG_COEF_ROW, crow);
    wr(WREG_CTRL, 32'b11);
    @(posedge irq);
    for (int c = 0; c < chans; c++)
      for (int m = 0; m < frames; m++)
        for (int n = 0; n < win; n++) begin
          logic [W-1:0] e;
          e = weight_word(u_ddr.mem[src + c*stride + m*hop + n], hrow(crow + n), ns);
          checks++;
          if (u_ddr.mem[dst + k] !== e) begin
            failures++; $display("FAIL word %0d got %h exp %h", k, u_ddr.mem[dst + k], e);
          end
          k++;
        end
    wr(WREG_STATUS, 32'b10);
    check("irq cleared", irq, 0);
  endtask

  initial begin
    csr_req = '0; coef_req = '0;
    for (int i = 0; i < 1024; i++) h[i] = 16'($urandom);
    h[3] = 16'h8000;                                   // forces a saturating lane
    for (int i = 0; i < 8192; i++) u_ddr.mem[i] = {$urandom, $urandom, $urandom, $urandom};
    u_ddr.mem[40][3*16 +: 16] = 16'h8000;              // sample -32768 meets h[3]
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); coef_req = '0; coef_req.write = 1; coef_req.address = HOST_AW'(i * 4);
      coef_req.writedata = {h[2*i+1], h[2*i]}; coef_req.byteenable = 4'hF;
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); coef_req = '0; coef_req.read = 1; coef_req.address = HOST_AW'(i * 4);
      @(negedge clk); coef_req = '0;
      check("coef read-back", coef_rsp.readdata, {h[2*i+1], h[2*i]});
    end
    // window of 16 words (La = 128 samples), hop 4 words (R = 32), 4 frames, 2 channels
    order(40, 4000, 16, 4, 4, 2, 200, 0);
    // second order, other window rows
    order(1000, 6000, 8, 8, 3, 3, 64, 20);
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never seen"); end
    checks++;
    if (u_ddr.stalls == 0) begin failures++; $display("FAIL no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
