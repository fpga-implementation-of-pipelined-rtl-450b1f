// tb_dir_conv: self-checking test of the directional 1x7 filter.
// The bench models the smoothed-image memory (40x40, registered read) and
// sweeps every centre of the image for the horizontal, vertical and both
// diagonal directions and decimation strides 1..3, comparing every result,
// its coordinates and its 3-clock latency against a reference that clamps
// tap positions to the image border. It also counts border-clamped outputs.
module tb_dir_conv;
  import steer_pkg::*;

  localparam int W = 40, H = 40, N = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dir_t                    dir;
  logic [1:0]              decim;
  logic                    in_valid, in_last, out_valid, out_last;
  logic [5:0]              in_x, in_y, out_x, out_y;
  logic [N-1:0][5:0]       rd_x, rd_y;
  logic [N-1:0][PIX_W-1:0] rd_data;
  logic [PIX_W-1:0]        out_pix;

  dir_conv #(.N(N), .COEF(G7), .SHIFT(6), .W(W), .H(H)) dut (.*);

  // memory model
  logic [7:0] img [H][W];
  always @(posedge clk)
    for (int k = 0; k < N; k++)
      rd_data[k] <= (int'(rd_x[k]) < W && int'(rd_y[k]) < H) ? img[rd_y[k]][rd_x[k]] : 8'hxx;

  int checks = 0, failures = 0, clamped = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int binom(int n, int k);
    int r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  int exp_q[$], ex_q[$], ey_q[$], ec_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        int e, ex, ey, ec;
        e = exp_q.pop_front(); ex = ex_q.pop_front(); ey = ey_q.pop_front(); ec = ec_q.pop_front();
        if (int'(out_pix) != e || int'(out_x) != ex || int'(out_y) != ey || cycle != ec + 3) begin
          failures++;
          $display("FAIL: got %0d (%0d,%0d) at %0d, expected %0d (%0d,%0d) at %0d",
                   out_pix, out_x, out_y, cycle, e, ex, ey, ec + 3);
        end
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dxs[4] = '{1, 0, 1, 1};
    int dys[4] = '{0, 1, 1, -1};
    in_valid = 0; in_last = 0; in_x = 0; in_y = 0; dir = '0; decim = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 4; d++)
      for (int s = 1; s <= 3; s++) begin
        if (d > 1 && s > 1) continue;
        @(negedge clk); in_valid = 0;
        dir.dx = 2'(dxs[d]); dir.dy = 2'(dys[d]); decim = 2'(s);
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            int sum; bit clip; sum = 0; clip = 0;
            for (int k = 0; k < N; k++) begin
              int px, py;
              px = x + (k - 3) * s * dxs[d];
              py = y + (k - 3) * s * dys[d];
              if (px < 0 || px >= W || py < 0 || py >= H) clip = 1;
              sum += binom(N - 1, k) * int'(img[clampi(py, H - 1)][clampi(px, W - 1)]);
            end
            if (clip) clamped++;
            @(negedge clk);
            in_valid = 1; in_x = 6'(x); in_y = 6'(y);
            in_last = (x == W - 1) && (y == H - 1);
            exp_q.push_back((sum + 32) >>> 6);
            ex_q.push_back(x); ey_q.push_back(y); ec_q.push_back(cycle);
          end
      end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || clamped == 0) begin
      failures++; $display("FAIL: %0d outputs missing, %0d clamped", exp_q.size(), clamped);
    end
    $display("clamped outputs: %0d", clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
