// tb_ebci_sopc -- end-to-end test of the BCI hardware layer at its default
// parameters (8 lanes, 64 KB window RAM, 4 KB buffer, 150 MHz timer).
//
// The testbench plays the host processor's part of one trial of the WOLA
// filter: it stores a synthetic 22-channel, 500-sample EEG trial (alpha and
// beta rhythms plus noise, 16-bit) in the DDR2 model, loads a Hann analysis
// window of La = 128 coefficients into the window RAM over the host bus,
// starts the interval timer, orders the windowing of all 22 channels with
// R = 32 (12 overlapping frames per channel), waits for the interrupt, reads
// the elapsed time and the co-processor's counters, and compares every
// weighted word with a reference computed here. A second, one-word order on
// a full-scale word forces the saturation path; the 4 KB buffer is used as
// scratch memory and an unmapped address is read. Each mechanism (DDR2
// stall, overlapping frames, channel loop, irq, timer time-out, saturation,
// decode error, buffer access) is counted and must occur at least once.
module tb_ebci_sopc;
  import ebci_pkg::*;
  import wola_ref_pkg::*;
  localparam int LANES = 8, W = 128;
  localparam int CH = 22, NS = 500, STRIDE_W = 63;   // channel stride: 504 samples
  localparam int LA = 128, R = 32;
  localparam int WIN_W = LA / LANES, HOP_W = R / LANES;
  localparam int FRAMES = (NS - LA) / R + 1;          // 12
  localparam int SRC_W = 0, DST_W = 4096;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  host_req_t host_req;
  host_rsp_t host_rsp;
  logic host_decode_err, irq_wola, irq_timer;
  logic [31:0] ddr_address;
  logic ddr_read, ddr_write, ddr_readdatavalid, ddr_waitrequest;
  logic [W-1:0] ddr_writedata, ddr_readdata;
  logic [LANES-1:0] wola_sat;

  ebci_sopc dut (.*);
  ddr2_model #(.DW(W), .WORDS(16384), .STALL_PCT(15), .MIN_LAT(2), .MAX_LAT(6)) u_ddr (
    .clk, .address(ddr_address), .read(ddr_read), .write(ddr_write), .writedata(ddr_writedata),
    .readdata(ddr_readdata), .readdatavalid(ddr_readdatavalid), .waitrequest(ddr_waitrequest));

  int checks = 0, failures = 0;
  int n_stall, n_overlap, n_chan, n_irq, n_timeout, n_sat, n_decode, n_buf;
  always @(posedge clk) begin
    if (wola_sat != 0 && ddr_write && !ddr_waitrequest) n_sat++;
    if (host_decode_err) n_decode++;
  end
  always @(posedge irq_wola) n_irq++;
  always @(posedge irq_timer) n_timeout++;

  task automatic hw(logic [19:0] a, logic [31:0] d);
    @(negedge clk); host_req = '0; host_req.write = 1; host_req.address = a;
    host_req.writedata = d; host_req.byteenable = 4'hF;
    @(negedge clk); host_req = '0;
  endtask
  task automatic hr(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); host_req = '0; host_req.read = 1; host_req.address = a;
    @(negedge clk); host_req = '0; d = host_rsp.readdata;
  endtask
  function automatic logic [19:0] wreg(wola_reg_e r);  return WOLA_BASE  | 20'({r, 2'b00}); endfunction
  function automatic logic [19:0] treg(timer_reg_e r); return TIMER_BASE | 20'({r, 2'b00}); endfunction
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  logic [15:0] h [LA];

  initial begin
    logic [31:0] d, cycles, ticks;
    int k, ns;
    host_req = '0;
    // synthetic EEG trial, channel-major, 16-bit samples
    for (int i = 0; i < 16384; i++) u_ddr.mem[i] = '0;
    for (int c = 0; c < CH; c++)
      for (int n = 0; n < NS; n++) begin
        real v;
        int iv;
        v = 3000.0 * $sin(2.0 * PI * 10.0 * n / 250.0 + c * 0.3)
          + 1500.0 * $sin(2.0 * PI * 20.0 * n / 250.0 + c * 0.7)
          + real'(int'($urandom % 2001) - 1000);
        iv = int'(v);
        u_ddr.mem[SRC_W + c * STRIDE_W + n / LANES][(n % LANES) * 16 +: 16] = 16'(iv);
      end
    // Hann window in Q1.15
    for (int n = 0; n < LA; n++) h[n] = 16'(int'(32767.0 * 0.5 * (1.0 - $cos(2.0 * PI * n / LA))));
    repeat (3) @(posedge clk);
    rst_n = 1;

    // load the window: two coefficients per word
    for (int i = 0; i < LA / 2; i++) hw(COEF_BASE | 20'(i * 4), {h[2*i+1], h[2*i]});
    // a saturating row at row 100: all coefficients -1.0
    for (int i = 0; i < LANES / 2; i++) hw(COEF_BASE | 20'(100 * 16 + i * 4), 32'h8000_8000);
    hr(COEF_BASE | 20'(4 * 5), d); check("window read-back", d, {h[11], h[10]});

    // scratch use of the on-chip buffer
    for (int i = 0; i < 8; i++) hw(BUF_BASE | 20'(i * 4), 32'hB0F0_0000 + i);
    for (int i = 0; i < 8; i++) begin
      hr(BUF_BASE | 20'(i * 4), d); check("buffer", d, 32'hB0F0_0000 + i); n_buf++;
    end
    // unmapped read
    hr(20'h2_0000, d); check("unmapped read", d, 32'hDEAD_BEEF);

    // timer: default period (10 us), continuous, irq enabled
    hr(treg(TREG_PERIOD), d); check("timer period", d, 1499);
    hw(treg(TREG_TICKS), 0);
    hw(treg(TREG_CONTROL), 32'b0111);

    // the windowing order for the whole trial
    hw(wreg(WREG_SRC), SRC_W * 16);
    hw(wreg(WREG_DST), DST_W * 16);
    hw(wreg(WREG_WIN_WORDS), WIN_W);
    hw(wreg(WREG_HOP_WORDS), HOP_W);
    hw(wreg(WREG_FRAMES), FRAMES);
    hw(wreg(WREG_CHANNELS), CH);
    hw(wreg(WREG_CH_STRIDE), STRIDE_W * 16);
    hw(wreg(WREG_COEF_ROW), 0);
    hw(wreg(WREG_CTRL), 32'b11);
    @(posedge irq_wola);
    hr(treg(TREG_TICKS), ticks);
    hw(treg(TREG_CONTROL), 32'b1000);
    hw(treg(TREG_STATUS), 0);
    hr(wreg(WREG_CYCLES), cycles);
    hr(wreg(WREG_WORDS), d); check("words written", d, CH * FRAMES * WIN_W);
    checks++;
    if (cycles < 3 * CH * FRAMES * WIN_W + 1) begin failures++; $display("FAIL cycles %0d too few", cycles); end
    checks++;   // the timer saw the order's duration in 10 us ticks (+ register accesses)
    if (ticks < cycles / 1500 || ticks > cycles / 1500 + 1) begin
      failures++; $display("FAIL timer ticks %0d for %0d cycles", ticks, cycles);
    end
    $display("order: %0d words in %0d cycles (%0d.%02d us at 150 MHz), timer %0d ticks",
             CH * FRAMES * WIN_W, cycles, cycles / 150, (cycles % 150) * 100 / 150, ticks);
    hw(wreg(WREG_STATUS), 32'b10);
    check("irq cleared", irq_wola, 0);

    k = 0;
    for (int c = 0; c < CH; c++) begin
      for (int m = 0; m < FRAMES; m++) begin
        for (int n = 0; n < WIN_W; n++) begin
          logic [W-1:0] hv, e;
          for (int l = 0; l < LANES; l++) hv[l*16 +: 16] = h[n * LANES + l];
          e = weight_word(u_ddr.mem[SRC_W + c * STRIDE_W + m * HOP_W + n], hv, ns);
          checks++;
          if (u_ddr.mem[DST_W + k] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL ch %0d frame %0d word %0d got %h exp %h", c, m, n, u_ddr.mem[DST_W + k], e);
          end
          k++;
        end
        if (m > 0 && HOP_W < WIN_W) n_overlap++;
      end
      n_chan++;
    end

    // one-word order on a full-scale word with the -1.0 row: saturates
    u_ddr.mem[15000] = {8{16'h8000}};
    hw(wreg(WREG_SRC), 15000 * 16); hw(wreg(WREG_DST), 15001 * 16);
    hw(wreg(WREG_WIN_WORDS), 1); hw(wreg(WREG_FRAMES), 1); hw(wreg(WREG_CHANNELS), 1);
    hw(wreg(WREG_COEF_ROW), 100);
    hw(wreg(WREG_CTRL), 32'b11);
    @(posedge irq_wola);
    hw(wreg(WREG_STATUS), 32'b10);
    checks++;
    if (u_ddr.mem[15001] !== {8{16'h7FFF}}) begin failures++; $display("FAIL saturation result %h", u_ddr.mem[15001]); end

    n_stall = u_ddr.stalls;
    $display("mechanisms: stall=%0d overlap=%0d channels=%0d irq=%0d timeout=%0d sat=%0d decode_err=%0d buffer=%0d",
             n_stall, n_overlap, n_chan, n_irq, n_timeout, n_sat, n_decode, n_buf);
    if (n_stall == 0)   begin failures++; $display("FAIL no DDR2 stall"); end
    if (n_overlap == 0) begin failures++; $display("FAIL no overlapping frame"); end
    if (n_chan < 2)     begin failures++; $display("FAIL channel loop not exercised"); end
    if (n_irq < 2)      begin failures++; $display("FAIL irq count %0d", n_irq); end
    if (n_timeout == 0) begin failures++; $display("FAIL no timer time-out"); end
    if (n_sat == 0)     begin failures++; $display("FAIL no saturation"); end
    if (n_decode == 0)  begin failures++; $display("FAIL no decode error"); end
    if (n_buf == 0)     begin failures++; $display("FAIL buffer unused"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
