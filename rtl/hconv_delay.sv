// hconv_delay: delay line of vertical results feeding the horizontal 1xN pass.
//
// The vertical pass delivers one column result per clock, scanning each row
// from left to right. Those results are pushed into a chain of N registers
// (the "D" chain of the block diagram); the N register outputs are the taps
// of the horizontal 1xN convolution, so the vertical and horizontal passes
// run at the same time on one stream. Once the chain holds N results of the
// same row (input column in_x >= N-1) every new input yields one output, for
// the output column in_x-(N-1). Only fully covered outputs are produced: a
// row of W inputs gives W-N+1 outputs.
//
// Interface: in_valid/in_x/in_y/in_last with the vertical result in_pix.
// Inputs of one row must arrive in column order, columns 0..W-1; gaps
// between inputs (in_valid low) are allowed. out_* carry the smoothed pixel,
// its column and row in the output image and the last flag.
// Timing: latency 3 from in_valid to out_valid (1 for the chain, 2 for the
// multiply-add), throughput one pixel per clock.
//
// The delay-line structure follows the block diagram; the coordinates, the
// valid-only output region and the latency are this implementation's.
module hconv_delay
  import steer_pkg::*;
#(
  parameter int N     = SEP_TAPS,
  parameter logic [N-1:0][COEF_W-1:0] COEF = G9,
  parameter int SHIFT = G9_SHIFT,
  parameter int XW    = 6,
  parameter int YW    = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [XW-1:0]    in_x,
  input  logic [YW-1:0]    in_y,
  input  logic             in_last,
  input  logic [PIX_W-1:0] in_pix,
  output logic             out_valid,
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y,
  output logic             out_last,
  output logic [PIX_W-1:0] out_pix
);

  localparam int TAG_W = XW + YW + 1;

  // d_q[0] holds the newest result (rightmost tap), d_q[N-1] the oldest.
  logic [N-1:0][PIX_W-1:0] d_q;
  logic [N-1:0][PIX_W-1:0] taps;
  logic                    win_valid_q;
  logic [TAG_W-1:0]        win_tag_q;
  logic [TAG_W-1:0]        out_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q         <= '0;
      win_valid_q <= 1'b0;
      win_tag_q   <= '0;
    end else begin
      win_valid_q <= 1'b0;
      if (in_valid) begin
        d_q         <= {d_q[N-2:0], in_pix};
        win_valid_q <= (int'(in_x) >= N - 1);
        win_tag_q   <= {XW'(int'(in_x) - (N - 1)), in_y, in_last};
      end
    end
  end

  // Tap 0 of the kernel is the leftmost pixel, i.e. the oldest result.
  always_comb begin
    for (int k = 0; k < N; k++)
      taps[k] = d_q[N-1-k];
  end

  gauss_conv1d #(
    .N(N), .COEF(COEF), .SHIFT(SHIFT), .TAG_W(TAG_W)
  ) u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (win_valid_q),
    .in_pix   (taps),
    .in_tag   (win_tag_q),
    .out_valid(out_valid),
    .out_pix  (out_pix),
    .out_tag  (out_tag)
  );

  assign {out_x, out_y, out_last} = out_tag;

endmodule
