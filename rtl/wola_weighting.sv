// wola_weighting -- the parallel multipliers of the WOLA windowing IP.
//
// The windowing step of the WOLA analysis multiplies each EEG sample x(n) of a
// frame by the analysis window coefficient h(n). The original co-processor
// weights the samples "in parallel"; here LANES samples arrive together as one
// bus word and LANES multipliers weight them in the same cycle.
//
// Arithmetic (this design's choice): 16-bit signed samples times 16-bit Q1.15
// coefficients give a 32-bit product, which is rounded to nearest (adding half
// an LSB, ties toward +inf) and shifted right by 15 bits, then saturated to the
// 16-bit sample range. `sat` flags the lanes that saturated; with Q1.15 this
// only happens for -32768 * -32768.
//
// Timing: one register stage. The result appears the cycle after in_valid and
// holds until the next in_valid; out_valid is a one-cycle pulse.
module wola_weighting
  import ebci_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [LANES-1:0][SAMPLE_W-1:0]     samples,
  input  logic [LANES-1:0][COEF_W-1:0]       coefs,
  output logic                               out_valid,
  output logic [LANES-1:0][SAMPLE_W-1:0]     weighted,
  output logic [LANES-1:0]                   sat
);

  localparam int unsigned PROD_W = SAMPLE_W + COEF_W;
  localparam logic signed [PROD_W-1:0] HALF   = PROD_W'(1) <<< (COEF_FRAC - 1);
  localparam logic signed [PROD_W-1:0] MAXV   = PROD_W'(2 ** (SAMPLE_W - 1) - 1);
  localparam logic signed [PROD_W-1:0] MINV   = -(PROD_W'(2 ** (SAMPLE_W - 1)));

  logic [LANES-1:0][SAMPLE_W-1:0] w_next;
  logic [LANES-1:0]               s_next;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [PROD_W-1:0] prod, scaled;
      prod   = PROD_W'($signed(samples[l])) * PROD_W'($signed(coefs[l]));
      scaled = (prod + HALF) >>> COEF_FRAC;
      if (scaled > MAXV) begin
        w_next[l] = MAXV[SAMPLE_W-1:0];
        s_next[l] = 1'b1;
      end else if (scaled < MINV) begin
        w_next[l] = MINV[SAMPLE_W-1:0];
        s_next[l] = 1'b1;
      end else begin
        w_next[l] = scaled[SAMPLE_W-1:0];
        s_next[l] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      weighted <= w_next;
      sat      <= s_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
