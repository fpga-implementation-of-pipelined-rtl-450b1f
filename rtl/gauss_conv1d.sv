// gauss_conv1d: N-tap 1-D Gaussian multiply-add with rounding normalisation.
//
// This is the arithmetic of every convolution pass of the filter: the
// vertical 9x1 pass is this unit fed with nine pixels of one image column,
// and the horizontal 1x9 and the directional 1x7 passes use it behind their
// own tap-gathering logic. Each tap is multiplied by its weight; the
// products are added and the sum is normalised as (sum + 2^(SHIFT-1)) >>
// SHIFT, so that with weights summing to 2^SHIFT a flat image stays flat and
// the result always fits PIX_W bits.
//
// Timing: fully pipelined, one window per clock, latency 2 (products are
// registered, then the rounded sum). A sideband tag of TAG_W bits travels
// with the data so that callers can carry pixel coordinates alongside.
// Tap and weight index 0 is the first (top, or leftmost) tap.
//
// The multiply-then-add structure follows the description ("pixels are
// multiplied with the weights of Gaussian mask and finally given to add");
// the pipeline depth and the rounding are choices of this implementation.
module gauss_conv1d
  import steer_pkg::*;
#(
  parameter int N      = SEP_TAPS,
  parameter logic [N-1:0][COEF_W-1:0] COEF = G9,
  parameter int SHIFT  = G9_SHIFT,
  parameter int TAG_W  = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N-1:0][PIX_W-1:0] in_pix,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic [PIX_W-1:0]       out_pix,
  output logic [TAG_W-1:0]       out_tag
);

  localparam int PROD_W = PIX_W + COEF_W;
  localparam int SUM_W  = PROD_W + $clog2(N);

  logic [N-1:0][PROD_W-1:0] prod_q;
  logic                     v1_q;
  logic [TAG_W-1:0]         tag1_q;
  logic [SUM_W-1:0]         sum;
  logic [SUM_W-1:0]         rounded;

  // Stage 1: one multiplier per tap.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      v1_q   <= 1'b0;
      tag1_q <= '0;
    end else begin
      v1_q   <= in_valid;
      tag1_q <= in_tag;
      for (int k = 0; k < N; k++)
        prod_q[k] <= PROD_W'(in_pix[k]) * PROD_W'(COEF[k]);
    end
  end

  // Stage 2: adder tree (written as a sum), round and shift.
  always_comb begin
    sum = '0;
    for (int k = 0; k < N; k++)
      sum = sum + SUM_W'(prod_q[k]);
    rounded = (sum + (SUM_W'(1) << (SHIFT - 1))) >> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= v1_q;
      out_tag   <= tag1_q;
      // Saturate in case the weights are changed to sum above 2^SHIFT.
      out_pix   <= (rounded > SUM_W'({PIX_W{1'b1}})) ? {PIX_W{1'b1}}
                                                     : rounded[PIX_W-1:0];
    end
  end

endmodule
