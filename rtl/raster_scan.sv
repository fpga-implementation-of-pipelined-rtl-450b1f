// raster_scan: coordinate generator that walks a W x H frame row by row.
//
// A one-clock start pulse (while idle) starts a scan and samples step. The
// generator then issues one coordinate per clock, x = 0, step, 2*step, ...
// up to W-1 within a row and rows y = 0, step, ... up to H-1, with valid
// high, and marks the final coordinate with last. With step = 1 every pixel
// is visited; a larger step visits only a subsampled grid, which is how the
// directional stage downsamples its output. A step of 0 is taken as 1.
// busy is high from the clock after start until the final coordinate has
// been issued; a start while busy is ignored. Every stage of the filter is
// driven by one of these: the separable stage scans the input columns
// needed for its output rows, the directional stage scans the smoothed
// image. The scan order is implied by the streaming design of the filter;
// the start/busy handshake and the step input are this implementation's.
module raster_scan #(
  parameter int W  = 48,
  parameter int H  = 40,
  localparam int XW = $clog2(W),
  localparam int YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1:0]    step,
  output logic          busy,
  output logic          valid,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          last
);

  logic [1:0] step_q;
  logic       row_end, col_end;

  // The next position along a row (or column) would leave the frame.
  assign row_end = int'(x) + int'(step_q) > W - 1;
  assign col_end = int'(y) + int'(step_q) > H - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      x      <= '0;
      y      <= '0;
      step_q <= 2'd1;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        x      <= '0;
        y      <= '0;
        step_q <= (step == 2'd0) ? 2'd1 : step;
      end
    end else if (last) begin
      busy <= 1'b0;
    end else if (row_end) begin
      x <= '0;
      y <= y + YW'(step_q);
    end else begin
      x <= x + XW'(step_q);
    end
  end

  assign valid = busy;
  assign last  = busy && row_end && col_end;

endmodule
