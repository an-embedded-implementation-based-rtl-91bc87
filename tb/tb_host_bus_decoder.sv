// tb_host_bus_decoder -- checks the host address decoder.
//
// Four small register-file slave models sit behind the decoder. Random
// accesses across the map check that only the addressed slave sees the
// request, with its address relative to the slave's base, that read data
// comes back from the right slave, and that an unmapped read returns
// 0xDEADBEEF and flags decode_err.
module tb_host_bus_decoder;
  import ebci_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  host_req_t s_req;
  host_rsp_t s_rsp;
  host_req_t [3:0] m_req;
  host_rsp_t [3:0] m_rsp;
  logic decode_err;
  int checks = 0, failures = 0;

  host_bus_decoder #(.N(4)) dut (.*);

  localparam logic [19:0] BASES [4] = '{20'h00000, 20'h10000, 20'h11000, 20'h11100};

  // slave models: 16-word register files; read data tagged with slave id
  logic [31:0] regs [4][16];
  for (genvar i = 0; i < 4; i++) begin : g_slv
    localparam logic [19:0] LIMIT = (i == 0) ? 20'hFFFFF : (i == 1) ? 20'd4095 : 20'd255;
    always_ff @(posedge clk) begin
      m_rsp[i].readdatavalid <= m_req[i].read;
      if (m_req[i].read) m_rsp[i].readdata <= regs[i][m_req[i].address[5:2]] ^ (32'(i) << 28);
      if (m_req[i].write) regs[i][m_req[i].address[5:2]] <= m_req[i].writedata;
      if ((m_req[i].read || m_req[i].write) && m_req[i].address > LIMIT) begin
        failures++; $display("FAIL slave %0d got out-of-window address %h", i, m_req[i].address);
      end
    end
  end

  logic [31:0] ref_r [4][16];

  initial begin
    s_req = '0;
    foreach (regs[i, j]) begin regs[i][j] = 0; ref_r[i][j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int s, w;
      logic [19:0] a;
      s = $urandom % 5; w = $urandom % 16;
      a = (s < 4) ? BASES[s] + 20'(w * 4) : 20'h12000 + 20'(w * 4);
      @(negedge clk); s_req = '0; s_req.address = a; s_req.byteenable = 4'hF;
      if ($urandom % 2) begin
        s_req.write = 1; s_req.writedata = $urandom;
        if (s < 4) ref_r[s][w] = s_req.writedata;
        #1;
        checks++;
        if (decode_err != (s == 4)) begin failures++; $display("FAIL decode_err on write"); end
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (m_req[i].write != (i == s)) begin failures++; $display("FAIL write routed to %0d for %0d", i, s); end
        end
      end else begin
        s_req.read = 1;
        @(negedge clk); s_req = '0;
        checks++;
        if (!s_rsp.readdatavalid ||
            s_rsp.readdata !== ((s < 4) ? ref_r[s][w] ^ (32'(s) << 28) : 32'hDEAD_BEEF)) begin
          failures++; $display("FAIL read slave %0d word %0d got %h", s, w, s_rsp.readdata);
        end
      end
    end
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
