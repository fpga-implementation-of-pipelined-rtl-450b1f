// tb_gauss_conv1d: self-checking test of the N-tap Gaussian multiply-add.
// Drives random 9-pixel windows (with random idle clocks), plus flat and
// extreme windows, and compares each result, its tag and its 2-clock
// latency against a reference that computes binomial weights on its own.
module tb_gauss_conv1d;
  import steer_pkg::*;

  localparam int N = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    in_valid;
  logic [N-1:0][PIX_W-1:0] in_pix;
  logic [15:0]             in_tag;
  logic                    out_valid;
  logic [PIX_W-1:0]        out_pix;
  logic [15:0]             out_tag;

  gauss_conv1d #(.N(N), .COEF(G9), .SHIFT(8), .TAG_W(16)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int binom(int n, int k);
    int r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  function automatic int ref_out(logic [N-1:0][PIX_W-1:0] p);
    int s = 0;
    for (int k = 0; k < N; k++) s += binom(N - 1, k) * int'(p[k]);
    return (s + 128) >>> 8;
  endfunction

  int exp_q[$];
  int exp_tag_q[$];
  int exp_cyc_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        int e, t, c;
        e = exp_q.pop_front(); t = exp_tag_q.pop_front(); c = exp_cyc_q.pop_front();
        if (int'(out_pix) != e || int'(out_tag) != t || cycle != c + 2) begin
          failures++;
          $display("FAIL: got %0d tag %0d at %0d, expected %0d tag %0d at %0d",
                   out_pix, out_tag, cycle, e, t, c + 2);
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_pix = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < N; k++) begin
        case (n)
          0: in_pix[k] = 8'd255;
          1: in_pix[k] = 8'd0;
          2: in_pix[k] = 8'd100;
          3: in_pix[k] = (k == 4) ? 8'd255 : 8'd0;
          default: in_pix[k] = 8'($urandom);
        endcase
      end
      if (n < 4) in_valid = 1;
      in_tag = 16'($urandom);
      if (in_valid) begin
        exp_q.push_back(ref_out(in_pix));
        exp_tag_q.push_back(int'(in_tag));
        exp_cyc_q.push_back(cycle);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
