// tb_steer_top: end-to-end test of the steerable Gaussian smoother at its
// default size (48x48 image, two directional units), with no parameter
// overrides. Four complete runs are made:
//   1. random image, horizontal + vertical directions, stride 1;
//   2. same image, the two diagonals, decimation 2 (direction and
//      decimation switch; 20x20 centres);
//   3. new image with a bright square, vertical + horizontal, decimation 3
//      (14x14 centres), with an extra start pulse while busy (ignored);
//   4. same image, horizontal + anti-diagonal, decim driven as 0, which must
//      give the decimation-1 result.
// The bench computes the vertical 9x1, horizontal 1x9 and directional 1x7
// passes itself from binomial weights and checks every pixel of the
// smoothed-image stream and of both directional streams, their order and
// coordinates, and the cycle counts of each stage. It counts how often each
// mechanism occurred (stage runs, border clamping, direction and
// decimation switches, downsampled frames, ignored start) and fails if one
// never did.
module tb_steer_top;
  import steer_pkg::*;

  localparam int W = 48, H = 48, NDIR = 2;
  localparam int IW = W - 8, IH = H - 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       ld_we;
  logic [5:0]                 ld_x, ld_y;
  logic [PIX_W-1:0]           ld_data;
  logic                       start, busy, done;
  dir_t [NDIR-1:0]            dir;
  logic [1:0]                 decim;
  logic                       iso_valid, out_valid;
  logic [5:0]                 iso_x, iso_y, out_x, out_y;
  logic [PIX_W-1:0]           iso_pix;
  logic [NDIR-1:0][PIX_W-1:0] out_pix;

  steer_top dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_stage1 = 0, n_stage2 = 0, n_clamped = 0, n_dir_switch = 0;
  int n_decim_switch = 0, n_start_ignored = 0, n_loads = 0, n_downsampled = 0;

  int img [H][W];
  int vref [IH][W];
  int iso [IH][IW];
  int dref [NDIR][IH][IW];

  function automatic int binom(int n, int k);
    int r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  task automatic compute_ref(int dxs[NDIR], int dys[NDIR], int s);
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < W; x++) begin
        int a; a = 0;
        for (int k = 0; k < 9; k++) a += binom(8, k) * img[y + k][x];
        vref[y][x] = (a + 128) >>> 8;
      end
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        int a; a = 0;
        for (int k = 0; k < 9; k++) a += binom(8, k) * vref[y][x + k];
        iso[y][x] = (a + 128) >>> 8;
      end
    for (int d = 0; d < NDIR; d++)
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) begin
          int a; bit clip;
          a = 0; clip = 0;
          for (int k = 0; k < 7; k++) begin
            int px, py;
            px = x + (k - 3) * s * dxs[d];
            py = y + (k - 3) * s * dys[d];
            if (px < 0 || px >= IW || py < 0 || py >= IH) clip = 1;
            a += binom(6, k) * iso[clampi(py, IH - 1)][clampi(px, IW - 1)];
          end
          if (clip && x % s == 0 && y % s == 0) n_clamped++;
          dref[d][y][x] = (a + 32) >>> 6;
        end
  endtask

  task automatic load_image(int kind);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (kind == 0) img[y][x] = $urandom_range(0, 255);
        else img[y][x] = (x >= 16 && x < 32 && y >= 16 && y < 32) ? 240 : 10 + (x + y) % 7;
        @(negedge clk);
        ld_we = 1; ld_x = 6'(x); ld_y = 6'(y); ld_data = 8'(img[y][x]);
      end
    @(negedge clk); ld_we = 0;
    n_loads++;
  endtask

  // Run one frame and check both output streams and the stage timing.
  task automatic run_frame(int dxs[NDIR], int dys[NDIR], int s, bit poke_start, bit drive_zero = 0);
    int t, iso_n, out_n, first_iso, last_iso, t_done, nx;
    nx = (IW - 1) / s + 1;   // centres per row and per column
    compute_ref(dxs, dys, s);
    @(negedge clk);
    for (int d = 0; d < NDIR; d++) begin dir[d].dx = 2'(dxs[d]); dir[d].dy = 2'(dys[d]); end
    decim = drive_zero ? 2'd0 : 2'(s);   // 0 must behave as 1
    start = 1;
    @(posedge clk);              // start sampled here
    @(negedge clk); start = 0;
    // inputs may change while busy; the frame keeps its sampled settings
    dir = '0; decim = 2'd0;
    t = 0; iso_n = 0; out_n = 0; first_iso = -1; last_iso = -1; t_done = -1;
    while (t_done < 0 && t < 20000) begin
      @(posedge clk);
      t++;
      if (iso_valid) begin
        checks++;
        if (first_iso < 0) first_iso = t;
        last_iso = t;
        if (int'(iso_x) != iso_n % IW || int'(iso_y) != iso_n / IW ||
            int'(iso_pix) != iso[iso_n / IW][iso_n % IW]) begin
          failures++;
          $display("FAIL iso #%0d: got %0d at (%0d,%0d), expected %0d at (%0d,%0d)", iso_n,
                   iso_pix, iso_x, iso_y, iso[iso_n / IW][iso_n % IW], iso_n % IW, iso_n / IW);
        end
        iso_n++;
      end
      if (out_valid) begin
        int cx, cy;
        cx = (out_n % nx) * s;
        cy = (out_n / nx) * s;
        if (int'(out_x) != cx || int'(out_y) != cy) begin
          failures++;
          $display("FAIL dir #%0d: at (%0d,%0d), expected (%0d,%0d)", out_n, out_x, out_y, cx, cy);
        end
        for (int d = 0; d < NDIR; d++) begin
          checks++;
          if (int'(out_pix[d]) != dref[d][cy][cx]) begin
            failures++;
            $display("FAIL dir %0d #%0d: got %0d expected %0d", d, out_n, out_pix[d], dref[d][cy][cx]);
          end
        end
        if (iso_n != IW * IH) begin
          failures++; $display("FAIL: directional stage started before the smoothed image was complete");
        end
        out_n++;
      end
      if (done) t_done = t;
      if (poke_start && t == 500) start <= 1'b1;
      if (poke_start && t == 501) begin
        start <= 1'b0;
        if (busy) n_start_ignored++;
      end
    end
    // stage timing: one input column per clock, one centre per clock
    checks++;
    if (first_iso != 15 || last_iso != IH * W + 6 || t_done != IH * W + 6 + nx * nx + 3) begin
      failures++;
      $display("FAIL timing: first iso %0d (exp 15), last iso %0d (exp %0d), done %0d (exp %0d)",
               first_iso, last_iso, IH * W + 6, t_done, IH * W + 6 + nx * nx + 3);
    end
    checks++;
    if (iso_n != IW * IH || out_n != nx * nx) begin
      failures++; $display("FAIL counts: iso %0d dir %0d", iso_n, out_n);
    end
    if (iso_n == IW * IH) n_stage1++;
    if (out_n == nx * nx) n_stage2++;
    if (out_n == nx * nx && s > 1) n_downsampled++;
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after done"); end
    $display("frame: dir0=(%0d,%0d) dir1=(%0d,%0d) decimation %0d, %0d clocks", dxs[0], dys[0],
             dxs[1], dys[1], s, t_done);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; ld_x = 0; ld_y = 0; ld_data = 0; start = 0; dir = '0; decim = 2'd1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_image(0);
    run_frame('{1, 0}, '{0, 1}, 1, 0);
    run_frame('{1, 1}, '{1, -1}, 2, 0);
    n_dir_switch++; n_decim_switch++;
    load_image(1);
    run_frame('{0, 1}, '{1, 0}, 3, 1);
    n_dir_switch++; n_decim_switch++;
    run_frame('{1, -1}, '{0, 1}, 1, 0, 1);
    n_dir_switch++; n_decim_switch++;

    $display("mechanisms: loads=%0d stage1=%0d stage2=%0d clamped=%0d dir_switch=%0d decim_switch=%0d downsampled=%0d start_ignored=%0d",
             n_loads, n_stage1, n_stage2, n_clamped, n_dir_switch, n_decim_switch, n_downsampled, n_start_ignored);
    checks++;
    if (n_loads == 0 || n_stage1 == 0 || n_stage2 == 0 || n_clamped == 0 ||
        n_dir_switch == 0 || n_decim_switch == 0 || n_downsampled == 0 || n_start_ignored == 0) begin
      failures++; $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
