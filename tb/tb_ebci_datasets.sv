// tb_ebci_datasets -- runs the trial sizes of the evaluated EEG recordings
// through the hardware layer at its default parameters.
//
// Each recording differs only in channel count, sampling rate and trial
// length, so one order per recording is issued, with a window of about
// Fs/2 samples (one analysis bin per Hz) rounded to the 8-sample bus word:
//   competition IIa : 22 channels, 250 Hz, 500 samples,  La = 128,  R = 32
//   competition IVa : 60 channels, 250 Hz, 500 samples,  La = 128,  R = 32
//   competition IIIa: 118 channels, 1000 Hz, 2000 samples, La = 1000, R = 256
//   own recording   : 8 channels, 250 Hz, 500 samples,   La = 128,  R = 32
// The window is a Hann window loaded over the host bus; samples are random
// 16-bit values. Every weighted word is compared with a reference, and the
// cycles per order are printed (the DDR2 model stalls at random and answers
// reads after 1..3 cycles).
module tb_ebci_datasets;
  import ebci_pkg::*;
  import wola_ref_pkg::*;
  localparam int LANES = 8, W = 128, MEMW = 131072;
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
  ddr2_model #(.DW(W), .WORDS(MEMW), .STALL_PCT(10), .MIN_LAT(1), .MAX_LAT(3)) u_ddr (
    .clk, .address(ddr_address), .read(ddr_read), .write(ddr_write), .writedata(ddr_writedata),
    .readdata(ddr_readdata), .readdatavalid(ddr_readdatavalid), .waitrequest(ddr_waitrequest));

  int checks = 0, failures = 0;

  task automatic hw(logic [19:0] a, logic [31:0] d);
    @(negedge clk); host_req = '0; host_req.write = 1; host_req.address = a;
    host_req.writedata = d; host_req.byteenable = 4'hF;
    @(negedge clk); host_req = '0;
  endtask
  task automatic hr(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); host_req = '0; host_req.read = 1; host_req.address = a;
    @(negedge clk); host_req = '0; d = host_rsp.readdata;
  endtask
  function automatic logic [19:0] wreg(wola_reg_e r); return WOLA_BASE | 20'({r, 2'b00}); endfunction

  logic [15:0] h [1024];

  task automatic trial(string name, int ch, int ns, int la, int r);
    int win_w = la / LANES, hop_w = r / LANES, frames = (ns - la) / r + 1;
    int stride_w = (ns + LANES - 1) / LANES;
    int src_w = 0, dst_w = ch * stride_w;
    int k = 0, ns_sat, bad = 0;
    logic [31:0] d, cycles;
    for (int n = 0; n < la; n++) h[n] = 16'(int'(32767.0 * 0.5 * (1.0 - $cos(2.0 * PI * n / la))));
    for (int i = 0; i < la / 2; i++) hw(COEF_BASE | 20'(i * 4), {h[2*i+1], h[2*i]});
    for (int i = 0; i < ch * stride_w; i++) u_ddr.mem[src_w + i] = {$urandom, $urandom, $urandom, $urandom};
    hw(wreg(WREG_SRC), src_w * 16);       hw(wreg(WREG_DST), dst_w * 16);
    hw(wreg(WREG_WIN_WORDS), win_w);      hw(wreg(WREG_HOP_WORDS), hop_w);
    hw(wreg(WREG_FRAMES), frames);        hw(wreg(WREG_CHANNELS), ch);
    hw(wreg(WREG_CH_STRIDE), stride_w * 16); hw(wreg(WREG_COEF_ROW), 0);
    hw(wreg(WREG_CTRL), 32'b11);
    @(posedge irq_wola);
    hr(wreg(WREG_CYCLES), cycles);
    hr(wreg(WREG_WORDS), d);
    checks++;
    if (d != ch * frames * win_w) begin failures++; $display("FAIL %s words %0d", name, d); end
    hw(wreg(WREG_STATUS), 32'b10);
    for (int c = 0; c < ch; c++)
      for (int m = 0; m < frames; m++)
        for (int n = 0; n < win_w; n++) begin
          logic [W-1:0] hv, e;
          for (int l = 0; l < LANES; l++) hv[l*16 +: 16] = h[n * LANES + l];
          e = weight_word(u_ddr.mem[src_w + c * stride_w + m * hop_w + n], hv, ns_sat);
          checks++;
          if (u_ddr.mem[dst_w + k] !== e) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL %s ch %0d frame %0d word %0d", name, c, m, n);
          end
          k++;
        end
    $display("%s: %0d ch x %0d samples, La=%0d R=%0d: %0d frames/ch, %0d words in %0d cycles (%0d us at 150 MHz)",
             name, ch, ns, la, r, frames, k, cycles, cycles / 150);
  endtask

  initial begin
    host_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    trial("IIa",  22,  500,  128,  32);
    trial("IVa",  60,  500,  128,  32);
    trial("IIIa", 118, 2000, 1000, 256);
    trial("own",  8,   500,  128,  32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
