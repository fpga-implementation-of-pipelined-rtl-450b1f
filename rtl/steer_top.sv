// steer_top: pipelined steerable Gaussian smoothing filter.
//
// A directional Gaussian smoother at any angle is built from three 1-D
// Gaussian passes. The first two, vertical 9x1 then horizontal 1x9, form an
// isotropic 9x9 Gaussian; they do not depend on the direction and run once,
// as a single pipeline: nine pixels of one image column are read per clock,
// weighted and added, and the column results stream through a 9-register
// delay line whose outputs feed the horizontal pass. The smoothed image is
// stored; the third pass then filters it with a 7-tap 1-D Gaussian along
// each requested direction (NDIR units working side by side, by default
// horizontal and vertical), reading the taps straight from the stored image.
// Because the image is already smoothed, the third pass may be decimated by
// a factor s (decim): its taps are s pixels apart and it computes only the
// centres on an s-pixel grid, which cuts its work by s*s.
//
// Operation:
//   1. Load the IMG_W x IMG_H image through ld_we/ld_x/ld_y/ld_data.
//   2. Pulse start (one clock). dir[] and decim are sampled at that clock.
//   3. The separable stage scans IMG_H-8 rows of IMG_W columns, one column
//      per clock, and streams out the (IMG_W-8) x (IMG_H-8) smoothed image
//      on iso_* (only fully covered pixels are produced).
//   4. After its last pixel the directional stage scans the smoothed image
//      at centres (i*s, j*s), one centre per clock, and streams out_* with
//      one result per direction; borders are handled by repeating the edge
//      pixel. decim = 0 is taken as 1.
//   5. done pulses with the last result; busy is high from start to done.
// Timing at the default 48x48, counting rising edges after the edge that
// samples start: the first smoothed pixel is presented at edge 15 (the
// read, the 9x1 pass, the delay line and the 1x9 pass take 6 clocks, and 9
// columns must be read first), the last at edge 40*48+6 = 1926, and done at
// edge 1926+n*n+3, n = ceil(40/s) (3529 at s = 1). One input column and
// one directional centre are
// processed per clock. Stage 2 of one image and stage 1 of the next do not
// overlap.
//
// The image size, kernel lengths, the delay-line structure and the order of
// the stages follow the design description; pixel width, weights, border
// handling, the load port and the handshake are this implementation's.
module steer_top
  import steer_pkg::*;
#(
  parameter int IMG_W_P = IMG_W,
  parameter int IMG_H_P = IMG_H,
  parameter int NDIR    = 2,
  localparam int ISO_W  = IMG_W_P - SEP_TAPS + 1,
  localparam int ISO_H  = IMG_H_P - SEP_TAPS + 1,
  localparam int XW     = $clog2(IMG_W_P),
  localparam int YW     = $clog2(IMG_H_P),
  localparam int IXW    = $clog2(ISO_W),
  localparam int IYW    = $clog2(ISO_H)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // image load port
  input  logic                       ld_we,
  input  logic [XW-1:0]              ld_x,
  input  logic [YW-1:0]              ld_y,
  input  logic [PIX_W-1:0]           ld_data,
  // control
  input  logic                       start,
  input  dir_t [NDIR-1:0]            dir,
  input  logic [1:0]                 decim,
  output logic                       busy,
  output logic                       done,
  // isotropic (horizontal-vertical) result stream
  output logic                       iso_valid,
  output logic [IXW-1:0]             iso_x,
  output logic [IYW-1:0]             iso_y,
  output logic [PIX_W-1:0]           iso_pix,
  // directional result stream, one pixel per direction
  output logic                       out_valid,
  output logic [IXW-1:0]             out_x,
  output logic [IYW-1:0]             out_y,
  output logic [NDIR-1:0][PIX_W-1:0] out_pix
);

  // ---------------- control ----------------
  dir_t [NDIR-1:0] dir_q;
  logic [1:0]      decim_q;
  logic            go;

  assign go = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      for (int i = 0; i < NDIR; i++)
        dir_q[i] <= (i % 2 == 0) ? DIR_H : DIR_V;
      decim_q <= 2'd1;
    end else if (go) begin
      busy    <= 1'b1;
      dir_q   <= dir;
      decim_q <= (decim == 2'd0) ? 2'd1 : decim;
    end else if (done) begin
      busy    <= 1'b0;
    end
  end

  // ---------------- stage 1: separable 9x9 ----------------
  logic          s1_valid, s1_last, s1_busy;
  logic [XW-1:0] s1_x;
  logic [IYW-1:0] s1_y;

  raster_scan #(.W(IMG_W_P), .H(ISO_H)) u_scan1 (
    .clk(clk), .rst_n(rst_n), .start(go), .step(2'd1), .busy(s1_busy),
    .valid(s1_valid), .x(s1_x), .y(s1_y), .last(s1_last)
  );

  logic [SEP_TAPS-1:0][PIX_W-1:0] col_pix;

  image_bram #(.W(IMG_W_P), .H(IMG_H_P), .NRD(SEP_TAPS)) u_img (
    .clk(clk),
    .we(ld_we), .wx(ld_x), .wy(ld_y), .wdata(ld_data),
    .rd_en(s1_valid), .rx(s1_x), .ry(YW'(s1_y)), .rdata(col_pix)
  );

  // Coordinates of the column being read, aligned with the read data.
  logic                  rd_valid_q;
  logic [XW+IYW:0]       rd_tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid_q <= 1'b0;
      rd_tag_q   <= '0;
    end else begin
      rd_valid_q <= s1_valid;
      rd_tag_q   <= {s1_x, s1_y, s1_last};
    end
  end

  logic                v_valid, v_last;
  logic [PIX_W-1:0]    v_pix;
  logic [XW+IYW:0]     v_tag;
  logic [XW-1:0]       v_x;
  logic [IYW-1:0]      v_y;

  gauss_conv1d #(.N(SEP_TAPS), .COEF(G9), .SHIFT(G9_SHIFT), .TAG_W(XW+IYW+1)) u_vconv (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rd_valid_q), .in_pix(col_pix), .in_tag(rd_tag_q),
    .out_valid(v_valid), .out_pix(v_pix), .out_tag(v_tag)
  );

  assign {v_x, v_y, v_last} = v_tag;

  logic           h_valid, h_last;
  logic [XW-1:0]  h_x;
  logic [IYW-1:0] h_y;
  logic [PIX_W-1:0] h_pix;

  hconv_delay #(.N(SEP_TAPS), .COEF(G9), .SHIFT(G9_SHIFT), .XW(XW), .YW(IYW)) u_hconv (
    .clk(clk), .rst_n(rst_n),
    .in_valid(v_valid), .in_x(v_x), .in_y(v_y), .in_last(v_last), .in_pix(v_pix),
    .out_valid(h_valid), .out_x(h_x), .out_y(h_y), .out_last(h_last), .out_pix(h_pix)
  );

  assign iso_valid = h_valid;
  assign iso_x     = IXW'(h_x);
  assign iso_y     = h_y;
  assign iso_pix   = h_pix;

  // ---------------- smoothed-image memory ----------------
  localparam int NRD = NDIR * DIR_TAPS;

  logic [NRD-1:0][IXW-1:0]   m_rx;
  logic [NRD-1:0][IYW-1:0]   m_ry;
  logic [NRD-1:0][PIX_W-1:0] m_rdata;

  iso_ram #(.W(ISO_W), .H(ISO_H), .NRD(NRD)) u_iso (
    .clk(clk),
    .we(h_valid), .wx(iso_x), .wy(h_y), .wdata(h_pix),
    .rx(m_rx), .ry(m_ry), .rdata(m_rdata)
  );

  // ---------------- stage 2: directional 1x7 ----------------
  logic           s2_valid, s2_last, s2_busy;
  logic [IXW-1:0] s2_x;
  logic [IYW-1:0] s2_y;

  raster_scan #(.W(ISO_W), .H(ISO_H)) u_scan2 (
    .clk(clk), .rst_n(rst_n), .start(h_valid && h_last), .step(decim_q), .busy(s2_busy),
    .valid(s2_valid), .x(s2_x), .y(s2_y), .last(s2_last)
  );

  logic [NDIR-1:0]            d_valid, d_last;
  logic [NDIR-1:0][IXW-1:0]   d_x;
  logic [NDIR-1:0][IYW-1:0]   d_y;

  for (genvar i = 0; i < NDIR; i++) begin : g_dir
    dir_conv #(.N(DIR_TAPS), .COEF(G7), .SHIFT(G7_SHIFT), .W(ISO_W), .H(ISO_H)) u_dir (
      .clk(clk), .rst_n(rst_n),
      .dir(dir_q[i]), .decim(decim_q),
      .in_valid(s2_valid), .in_x(s2_x), .in_y(s2_y), .in_last(s2_last),
      .rd_x(m_rx[i*DIR_TAPS +: DIR_TAPS]),
      .rd_y(m_ry[i*DIR_TAPS +: DIR_TAPS]),
      .rd_data(m_rdata[i*DIR_TAPS +: DIR_TAPS]),
      .out_valid(d_valid[i]), .out_x(d_x[i]), .out_y(d_y[i]),
      .out_last(d_last[i]), .out_pix(out_pix[i])
    );
  end

  // All units see the same centres, so their outputs are in lockstep.
  assign out_valid = d_valid[0];
  assign out_x     = d_x[0];
  assign out_y     = d_y[0];
  assign done      = d_valid[0] && d_last[0];

`ifndef SYNTHESIS
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    d_valid == {NDIR{d_valid[0]}} && d_last == {NDIR{d_last[0]}} &&
    d_x == {NDIR{d_x[0]}} && d_y == {NDIR{d_y[0]}});
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(s1_busy && s2_busy));
`endif

endmodule
