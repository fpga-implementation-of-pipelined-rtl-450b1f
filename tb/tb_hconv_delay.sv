// tb_hconv_delay: self-checking test of the delay line + horizontal 1x9 pass.
// Streams random rows of 48 column results (with random idle clocks between
// them) and checks that each row yields exactly 40 outputs, with the right
// column, row, last flag and value, and that the latency is 3 clocks.
module tb_hconv_delay;
  import steer_pkg::*;

  localparam int W = 48, ROWS = 12, N = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid, in_last, out_valid, out_last;
  logic [5:0]       in_x, in_y, out_x, out_y;
  logic [PIX_W-1:0] in_pix, out_pix;

  hconv_delay #(.N(N), .COEF(G9), .SHIFT(8), .XW(6), .YW(6)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int binom(int n, int k);
    int r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  int row_pix[W];
  int exp_q[$], ex_q[$], ey_q[$], el_q[$], ec_q[$];
  int outputs = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      outputs++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        int e, ex, ey, el, ec;
        e = exp_q.pop_front(); ex = ex_q.pop_front(); ey = ey_q.pop_front();
        el = el_q.pop_front(); ec = ec_q.pop_front();
        if (int'(out_pix) != e || int'(out_x) != ex || int'(out_y) != ey ||
            int'(out_last) != el || cycle != ec + 3) begin
          failures++;
          $display("FAIL: got %0d (%0d,%0d,l%0d) at %0d, expected %0d (%0d,%0d,l%0d) at %0d",
                   out_pix, out_x, out_y, out_last, cycle, e, ex, ey, el, ec + 3);
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_last = 0; in_x = 0; in_y = 0; in_pix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < ROWS; y++) begin
      for (int x = 0; x < W; x++) begin
        row_pix[x] = (y == 0) ? ((x == 20) ? 255 : 0) : int'($urandom_range(0, 255));
        // idle clocks inside a row are allowed
        while ($urandom_range(0, 4) == 0) begin
          @(negedge clk); in_valid = 0; in_pix = 8'($urandom);
        end
        @(negedge clk);
        in_valid = 1; in_x = 6'(x); in_y = 6'(y); in_pix = 8'(row_pix[x]);
        in_last = (y == ROWS - 1) && (x == W - 1);
        if (x >= N - 1) begin
          int s; s = 0;
          for (int k = 0; k < N; k++) s += binom(N - 1, k) * row_pix[x - (N - 1) + k];
          exp_q.push_back((s + 128) >>> 8);
          ex_q.push_back(x - (N - 1)); ey_q.push_back(y);
          el_q.push_back(int'(in_last)); ec_q.push_back(cycle);
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (outputs != ROWS * (W - N + 1) || exp_q.size() != 0) begin
      failures++; $display("FAIL: %0d outputs, expected %0d", outputs, ROWS * (W - N + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
