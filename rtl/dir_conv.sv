// dir_conv: steerable (directional) 1-D Gaussian filter, the last stage.
//
// For each centre pixel (cx, cy) of the smoothed image this unit reads N
// pixels lying on a line through the centre,
//     (cx + r*s*dx, cy + r*s*dy),  r = -(N-1)/2 .. (N-1)/2,
// where (dx, dy) is the direction step and s the decimation stride, and
// returns their Gaussian-weighted sum. (1,0) gives the horizontal 1x7
// filter and (0,1) the vertical 7x1 filter of the design; other steps such
// as the diagonals (1,1) and (1,-1) work the same way. With s > 1 the taps
// are s pixels apart, i.e. adjacent in the image subsampled by s; the
// caller then presents only centres on the s-pixel grid, so the filter runs
// on the downsampled image with the same seven multipliers. Tap
// coordinates that fall outside the W x H image are clamped to its border
// (the edge pixel is repeated).
//
// Interface: the N read addresses rd_x/rd_y go combinationally to N read
// ports of the smoothed-image memory, whose registered data come back on
// rd_data one clock later. in_*/out_* carry the centre coordinates and a
// last flag. decim = 0 puts every tap on the centre pixel.
// Timing: latency 3 (memory read, then the 2-clock multiply-add), one
// output per clock.
//
// The tap count, the direction-dependent pixel access and the multiply-add
// follow the description; the step encoding, the meaning of the decimation
// factor as a tap stride and the border clamping are this implementation's.
module dir_conv
  import steer_pkg::*;
#(
  parameter int N     = DIR_TAPS,
  parameter logic [N-1:0][COEF_W-1:0] COEF = G7,
  parameter int SHIFT = G7_SHIFT,
  parameter int W     = IMG_W - SEP_TAPS + 1,
  parameter int H     = IMG_H - SEP_TAPS + 1,
  localparam int XW   = $clog2(W),
  localparam int YW   = $clog2(H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  dir_t                     dir,
  input  logic [1:0]               decim,
  input  logic                     in_valid,
  input  logic [XW-1:0]            in_x,
  input  logic [YW-1:0]            in_y,
  input  logic                     in_last,
  // read ports of the smoothed-image memory
  output logic [N-1:0][XW-1:0]     rd_x,
  output logic [N-1:0][YW-1:0]     rd_y,
  input  logic [N-1:0][PIX_W-1:0]  rd_data,
  // result
  output logic                     out_valid,
  output logic [XW-1:0]            out_x,
  output logic [YW-1:0]            out_y,
  output logic                     out_last,
  output logic [PIX_W-1:0]         out_pix
);

  localparam int TAG_W = XW + YW + 1;
  localparam int HALF  = (N - 1) / 2;

  logic             rd_valid_q;
  logic [TAG_W-1:0] rd_tag_q;
  logic [TAG_W-1:0] out_tag;

  // Tap addresses along the chosen direction, clamped to the image.
  always_comb begin
    for (int k = 0; k < N; k++) begin
      int off, px, py;
      off = (k - HALF) * int'(decim);
      px  = int'(in_x) + off * int'(dir.dx);
      py  = int'(in_y) + off * int'(dir.dy);
      if (px < 0)     px = 0;
      if (px > W - 1) px = W - 1;
      if (py < 0)     py = 0;
      if (py > H - 1) py = H - 1;
      rd_x[k] = XW'(px);
      rd_y[k] = YW'(py);
    end
  end

  // Align the centre coordinates with the memory's one-clock read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid_q <= 1'b0;
      rd_tag_q   <= '0;
    end else begin
      rd_valid_q <= in_valid;
      rd_tag_q   <= {in_x, in_y, in_last};
    end
  end

  gauss_conv1d #(
    .N(N), .COEF(COEF), .SHIFT(SHIFT), .TAG_W(TAG_W)
  ) u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rd_valid_q),
    .in_pix   (rd_data),
    .in_tag   (rd_tag_q),
    .out_valid(out_valid),
    .out_pix  (out_pix),
    .out_tag  (out_tag)
  );

  assign {out_x, out_y, out_last} = out_tag;

endmodule
