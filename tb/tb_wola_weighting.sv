// tb_wola_weighting -- checks the parallel window multipliers.
//
// Drives random and corner-case sample/coefficient words and compares every
// lane with x*h/2^15 rounded to nearest (ties up) and clamped to 16 bits,
// computed here with wide integers. Also checks the one-cycle latency, that
// the result holds while in_valid is low, and the saturation flags.
module tb_wola_weighting;
  localparam int LANES = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic [LANES-1:0][15:0] samples, coefs, weighted;
  logic [LANES-1:0] sat;
  int checks = 0, failures = 0;

  wola_weighting #(.LANES(LANES)) dut (.*);

  function automatic int expect_lane(int x, int h, output bit s);
    longint p, q;
    p = longint'(x) * longint'(h) + 16384;
    // floor division by 32768
    q = (p >= 0) ? p / 32768 : -((-p + 32767) / 32768);
    s = 0;
    if (q > 32767)  begin q = 32767;  s = 1; end
    if (q < -32768) begin q = -32768; s = 1; end
    return int'(q);
  endfunction

  task automatic apply_and_check(input logic [LANES-1:0][15:0] xs, input logic [LANES-1:0][15:0] hs);
    int e; bit s;
    @(negedge clk);
    samples = xs; coefs = hs; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    samples = '0; coefs = '0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL out_valid missing"); end
    for (int l = 0; l < LANES; l++) begin
      e = expect_lane($signed(xs[l]), $signed(hs[l]), s);
      checks++;
      if ($signed(weighted[l]) != e || sat[l] != s) begin
        failures++;
        $display("FAIL lane %0d x=%0d h=%0d got %0d sat %0b exp %0d sat %0b",
                 l, $signed(xs[l]), $signed(hs[l]), $signed(weighted[l]), sat[l], e, s);
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid not a pulse"); end
    for (int l = 0; l < LANES; l++) begin
      e = expect_lane($signed(xs[l]), $signed(hs[l]), s);
      if ($signed(weighted[l]) != e) begin failures++; $display("FAIL result not held"); break; end
    end
  endtask

  initial begin
    logic [LANES-1:0][15:0] xs, hs;
    int nsat = 0;
    samples = '0; coefs = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // corner cases
    for (int l = 0; l < LANES; l++) begin xs[l] = 16'h8000; hs[l] = 16'h8000; end
    xs[1] = 16'h7FFF; hs[1] = 16'h7FFF;
    xs[2] = 16'h0001; hs[2] = 16'h4000;   // 0.5 -> ties up to 1
    xs[3] = 16'hFFFF; hs[3] = 16'h4000;   // -0.5 -> 0
    xs[4] = 16'h8000; hs[4] = 16'h7FFF;
    xs[5] = 16'd1234; hs[5] = 16'h0000;
    xs[6] = 16'hFFFD; hs[6] = 16'h4000;   // -1.5 -> -1
    apply_and_check(xs, hs);
    if (sat[0] && !sat[1]) nsat++;
    for (int t = 0; t < 300; t++) begin
      for (int l = 0; l < LANES; l++) begin xs[l] = 16'($urandom); hs[l] = 16'($urandom); end
      apply_and_check(xs, hs);
    end
    checks++;
    if (nsat != 1) begin failures++; $display("FAIL saturation flags"); end
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
