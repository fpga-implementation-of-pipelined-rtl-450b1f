// iso_ram: memory for the isotropically smoothed image (the result of the
// horizontal-vertical convolution), read by the directional filters.
//
// W x H pixels, row-major, one write port written by the separable stage as
// its results stream out, and NRD independent read ports addressed by
// (column, row). Each read port returns its pixel one clock after the
// address (registered read, like a block RAM). The directional stage uses
// seven ports per direction. The memory and its role follow the block
// diagrams; the port count and read latency are this implementation's. A
// synthesiser builds the read ports by replicating the memory.
module iso_ram
  import steer_pkg::*;
#(
  parameter int W   = IMG_W - SEP_TAPS + 1,
  parameter int H   = IMG_H - SEP_TAPS + 1,
  parameter int NRD = 2 * DIR_TAPS,
  localparam int XW = $clog2(W),
  localparam int YW = $clog2(H)
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [XW-1:0]            wx,
  input  logic [YW-1:0]            wy,
  input  logic [PIX_W-1:0]         wdata,
  input  logic [NRD-1:0][XW-1:0]   rx,
  input  logic [NRD-1:0][YW-1:0]   ry,
  output logic [NRD-1:0][PIX_W-1:0] rdata
);

  logic [PIX_W-1:0] mem [W*H];

  always_ff @(posedge clk) begin
    if (we)
      mem[int'(wy) * W + int'(wx)] <= wdata;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NRD; p++)
      rdata[p] <= mem[int'(ry[p]) * W + int'(rx[p])];
  end

endmodule
