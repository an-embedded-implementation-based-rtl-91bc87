// tb_onchip_buffer -- checks the 4 KB on-chip staging RAM.
//
// Random byte-enabled writes and reads over the whole 4 KB against a
// reference array; checks one-cycle read latency.
module tb_onchip_buffer;
  import ebci_pkg::*;
  localparam int BYTES = 4096, WORDS = BYTES / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  host_req_t host_req;
  host_rsp_t host_rsp;
  int checks = 0, failures = 0;
  logic [31:0] ref_m [WORDS];

  onchip_buffer #(.BYTES(BYTES)) dut (.*);

  initial begin
    host_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); host_req = '0; host_req.write = 1; host_req.address = HOST_AW'(w*4);
      host_req.writedata = $urandom; host_req.byteenable = 4'hF; ref_m[w] = host_req.writedata;
    end
    for (int t = 0; t < 3000; t++) begin
      int w;
      w = $urandom % WORDS;
      @(negedge clk); host_req = '0;
      if ($urandom % 2) begin
        host_req.write = 1; host_req.address = HOST_AW'(w*4);
        host_req.writedata = $urandom; host_req.byteenable = 4'($urandom);
        for (int b = 0; b < 4; b++) if (host_req.byteenable[b]) ref_m[w][b*8 +: 8] = host_req.writedata[b*8 +: 8];
      end else begin
        host_req.read = 1; host_req.address = HOST_AW'(w*4);
        @(negedge clk); host_req = '0;
        checks++;
        if (!host_rsp.readdatavalid || host_rsp.readdata !== ref_m[w]) begin
          failures++; $display("FAIL word %0d got %h exp %h", w, host_rsp.readdata, ref_m[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
