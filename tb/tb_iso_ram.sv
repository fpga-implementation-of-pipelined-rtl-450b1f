// tb_iso_ram: self-checking test of the smoothed-image memory.
// Fills the 40x40 memory with random pixels, then drives random addresses
// on all fourteen read ports each clock and checks every port's data one
// clock later against the bench's copy; also checks a write is visible to
// a read issued on the next clock.
module tb_iso_ram;
  import steer_pkg::*;

  localparam int W = 40, H = 40, NRD = 14;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                     we;
  logic [5:0]               wx, wy;
  logic [PIX_W-1:0]         wdata;
  logic [NRD-1:0][5:0]      rx, ry;
  logic [NRD-1:0][PIX_W-1:0] rdata;

  iso_ram #(.W(W), .H(H), .NRD(NRD)) dut (.*);

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
    we = 0; wx = 0; wy = 0; wdata = 0; rx = '0; ry = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = 8'($urandom);
        @(negedge clk);
        we = 1; wx = 6'(x); wy = 6'(y); wdata = img[y][x];
      end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      int ax[NRD], ay[NRD];
      // occasionally overwrite a pixel and read it back at once
      if (n % 7 == 0) begin
        int x, y;
        x = $urandom_range(0, W - 1); y = $urandom_range(0, H - 1);
        img[y][x] = 8'($urandom);
        we = 1; wx = 6'(x); wy = 6'(y); wdata = img[y][x];
        @(negedge clk); we = 0;
        rx[0] = 6'(x); ry[0] = 6'(y);
        for (int p = 1; p < NRD; p++) begin rx[p] = 6'($urandom_range(0, W-1)); ry[p] = 6'($urandom_range(0, H-1)); end
      end else begin
        for (int p = 0; p < NRD; p++) begin rx[p] = 6'($urandom_range(0, W-1)); ry[p] = 6'($urandom_range(0, H-1)); end
      end
      for (int p = 0; p < NRD; p++) begin ax[p] = int'(rx[p]); ay[p] = int'(ry[p]); end
      @(negedge clk);
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== img[ay[p]][ax[p]]) begin
          failures++;
          $display("FAIL: port %0d (%0d,%0d) got %0d expected %0d", p, ax[p], ay[p], rdata[p], img[ay[p]][ax[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
