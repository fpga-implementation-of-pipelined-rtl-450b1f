// image_bram: input image memory with one column-window read per clock.
//
// Holds a W x H image of PIX_W-bit pixels, row-major. One write port loads
// the image (on an FPGA this memory would be initialised from a file at
// configuration; here the loader writes it pixel by pixel). The read side
// returns, one clock after rd_en, the NRD vertically adjacent pixels
// (rx, ry), (rx, ry+1), ... (rx, ry+NRD-1): exactly the nine inputs of the
// vertical 9x1 convolution. Rows past the bottom edge read the last row.
//
// The 48x48 size and the nine parallel outputs follow the block diagram of
// the design; the write port, the one-clock read latency and the handling
// of rows past the edge are choices of this implementation. A synthesiser
// may build the NRD read ports by replicating the memory, or the memory can
// be split into NRD row-interleaved banks (row mod NRD).
module image_bram
  import steer_pkg::*;
#(
  parameter int W   = IMG_W,
  parameter int H   = IMG_H,
  parameter int NRD = SEP_TAPS,
  localparam int XW = $clog2(W),
  localparam int YW = $clog2(H)
) (
  input  logic                     clk,
  // load port
  input  logic                     we,
  input  logic [XW-1:0]            wx,
  input  logic [YW-1:0]            wy,
  input  logic [PIX_W-1:0]         wdata,
  // column-window read port
  input  logic                     rd_en,
  input  logic [XW-1:0]            rx,
  input  logic [YW-1:0]            ry,
  output logic [NRD-1:0][PIX_W-1:0] rdata
);

  logic [PIX_W-1:0] mem [W*H];

  always_ff @(posedge clk) begin
    if (we)
      mem[int'(wy) * W + int'(wx)] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int k = 0; k < NRD; k++) begin
        int row;
        row = int'(ry) + k;
        if (row > H - 1) row = H - 1;
        rdata[k] <= mem[row * W + int'(rx)];
      end
    end
  end

endmodule
