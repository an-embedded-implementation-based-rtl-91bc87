// tb_wola_coef_mem -- checks the banked window-coefficient RAM.
//
// Loads random coefficients through the 32-bit host port (some writes with
// partial byte enables), keeping a reference copy indexed by coefficient
// number, then reads every row through the datapath port and a sample of
// words through the host port and compares. Also checks the one-cycle read
// latency and that rd_coefs holds while rd_en is low.
module tb_wola_coef_mem;
  import ebci_pkg::*;
  localparam int LANES = 8, COEF_BYTES = 2048;   // reduced size for a short run
  localparam int NCOEF = COEF_BYTES / 2, ROWS = NCOEF / LANES;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  host_req_t host_req;
  host_rsp_t host_rsp;
  logic rd_en;
  logic [$clog2(ROWS)-1:0] rd_row;
  logic [LANES-1:0][15:0] rd_coefs;
  int checks = 0, failures = 0;
  logic [15:0] ref_c [NCOEF];

  wola_coef_mem #(.LANES(LANES), .COEF_BYTES(COEF_BYTES)) dut (.*);

  task automatic hwrite(int word, logic [31:0] d, logic [3:0] be);
    @(negedge clk);
    host_req = '0;
    host_req.address = HOST_AW'(word * 4);
    host_req.write = 1; host_req.writedata = d; host_req.byteenable = be;
    @(negedge clk);
    host_req = '0;
    for (int b = 0; b < 4; b++)
      if (be[b]) ref_c[word*2 + b/2][(b%2)*8 +: 8] = d[b*8 +: 8];
  endtask

  initial begin
    host_req = '0; rd_en = 0; rd_row = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NCOEF / 2; w++) hwrite(w, $urandom, 4'hF);
    for (int t = 0; t < 100; t++) hwrite($urandom % (NCOEF / 2), $urandom, 4'($urandom));
    // datapath port, all rows
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); rd_en = 1; rd_row = r[$clog2(ROWS)-1:0];
      @(negedge clk); rd_en = 0; rd_row = '1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (rd_coefs[l] !== ref_c[r*LANES + l]) begin
          failures++; $display("FAIL row %0d lane %0d got %h exp %h", r, l, rd_coefs[l], ref_c[r*LANES+l]);
        end
      end
      @(negedge clk);   // hold check
      checks++;
      if (rd_coefs[0] !== ref_c[r*LANES]) begin failures++; $display("FAIL rd_coefs not held"); end
    end
    // host read-back
    for (int t = 0; t < 200; t++) begin
      int w;
      w = $urandom % (NCOEF / 2);
      @(negedge clk); host_req = '0; host_req.read = 1; host_req.address = HOST_AW'(w * 4);
      @(negedge clk); host_req = '0;
      checks++;
      if (!host_rsp.readdatavalid || host_rsp.readdata !== {ref_c[2*w+1], ref_c[2*w]}) begin
        failures++; $display("FAIL host read %0d got %h exp %h", w, host_rsp.readdata, {ref_c[2*w+1], ref_c[2*w]});
      end
      @(negedge clk);
      checks++;
      if (host_rsp.readdatavalid) begin failures++; $display("FAIL readdatavalid not a pulse"); end
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
