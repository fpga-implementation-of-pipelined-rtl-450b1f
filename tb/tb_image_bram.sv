// tb_image_bram: self-checking test of the input image memory.
// Loads a random 48x48 image, then reads random column windows (including
// windows that run past the bottom row) and checks all nine pixels and the
// one-clock read latency against a copy of the image kept by the bench.
module tb_image_bram;
  import steer_pkg::*;

  localparam int W = 48, H = 48, NRD = 9;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                     we, rd_en;
  logic [5:0]               wx, rx;
  logic [5:0]               wy, ry;
  logic [PIX_W-1:0]         wdata;
  logic [NRD-1:0][PIX_W-1:0] rdata;

  image_bram #(.W(W), .H(H), .NRD(NRD)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] img [H][W];

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rd_en = 0; wx = 0; wy = 0; wdata = 0; rx = 0; ry = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = 8'($urandom);
        @(negedge clk);
        we = 1; wx = 6'(x); wy = 6'(y); wdata = img[y][x];
      end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      int x, y;
      x = $urandom_range(0, W - 1);
      y = (n % 10 == 0) ? $urandom_range(H - NRD + 1, H - 1) : $urandom_range(0, H - NRD);
      @(negedge clk);
      rd_en = 1; rx = 6'(x); ry = 6'(y);
      @(negedge clk);
      rd_en = 0; rx = 6'($urandom_range(0, W - 1));   // must not disturb the held data
      for (int k = 0; k < NRD; k++) begin
        int row;
        row = (y + k > H - 1) ? H - 1 : y + k;
        checks++;
        if (rdata[k] !== img[row][x]) begin
          failures++;
          $display("FAIL: (%0d,%0d) tap %0d got %0d expected %0d", x, y, k, rdata[k], img[row][x]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
