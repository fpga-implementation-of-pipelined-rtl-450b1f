// tb_raster_scan: self-checking test of the raster coordinate generator.
// Runs 48x40 scans with steps 0 (taken as 1), 1, 2, 3 and 1 again; checks
// every coordinate, the last flag on the final one only, the duration (one
// clock per visited position), that step is sampled only at start, and
// that a start while busy is ignored.
module tb_raster_scan;
  localparam int W = 48, H = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, busy, valid, last;
  logic [1:0] step;
  logic [5:0] x, y;

  raster_scan #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; step = 2'd1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      int n, st, nx, ny;
      st = (run == 0 || run == 4) ? 1 : run;    // run 0 drives step 0, taken as 1
      nx = (W - 1) / st + 1;
      ny = (H - 1) / st + 1;
      @(negedge clk); start = 1; step = 2'(run % 4);
      @(negedge clk); start = 0; step = 2'd3;   // step is sampled at start only
      n = 0;
      while (valid) begin
        checks++;
        if (int'(x) != (n % nx) * st || int'(y) != (n / nx) * st ||
            last != (n == nx * ny - 1)) begin
          failures++;
          $display("FAIL: step %0d of scan %0d got (%0d,%0d,last=%0d)", n, run, x, y, last);
        end
        if (n == 100) start = 1;   // ignored while busy
        if (n == 101) start = 0;
        n++;
        @(negedge clk);
      end
      checks++;
      if (n != nx * ny || busy) begin
        failures++; $display("FAIL: scan took %0d clocks, expected %0d", n, nx * ny);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL: restarted without start"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
