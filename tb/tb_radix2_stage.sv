// tb_radix2_stage: drives the radix-2 stage with 16 groups of four random
// 5-bit sample pairs per symbol, for three symbols back to back, and checks
// four cycles later: g(n) = 2 (x(n) + x(n+64)) exactly (one fraction bit),
// h(n) = 2 (x(n) - x(n+64)) W128^n within 1 LSB of the exact product, and
// that the group number and tag travel with the data.
module tb_radix2_stage;
  import fft_pkg::*;
  import fft_tb_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [3:0] in_grp = '0, out_grp;
  logic [7:0] in_tag = '0, out_tag;
  cin_t x_lo [4], x_hi [4];
  logic out_valid, sat;
  cdata_t g [4], h [4];
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { int grp; int tag; int lo_re[4]; int lo_im[4]; int hi_re[4]; int hi_im[4]; longint t; } item_t;
  item_t q [$];

  radix2_stage #(.TAG_W(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int i = 0; i < 4; i++) begin x_lo[i] = '0; x_hi[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++)
      for (int c = 0; c < 16; c++) begin
        item_t it;
        @(negedge clk);
        in_valid = 1; in_grp = 4'(c); in_tag = 8'($urandom);
        it.grp = c; it.tag = int'(in_tag); it.t = cyc;
        for (int i = 0; i < 4; i++) begin
          it.lo_re[i] = int'($urandom_range(31)) - 16; it.lo_im[i] = int'($urandom_range(31)) - 16;
          it.hi_re[i] = int'($urandom_range(31)) - 16; it.hi_im[i] = int'($urandom_range(31)) - 16;
          x_lo[i].re = 5'(it.lo_re[i]); x_lo[i].im = 5'(it.lo_im[i]);
          x_hi[i].re = 5'(it.hi_re[i]); x_hi[i].im = 5'(it.hi_im[i]);
        end
        q.push_back(it);
      end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    item_t it;
    it = q.pop_front();
    checks++;
    if (cyc - it.t != LAT || int'(out_grp) != it.grp || int'(out_tag) != it.tag) begin
      failures++;
      $display("FAIL: group %0d came after %0d cycles with grp %0d tag %0d", it.grp, cyc - it.t, out_grp, out_tag);
    end
    for (int i = 0; i < 4; i++) begin
      int n, dr, di;
      real a, pr, pi_;
      n = 4 * it.grp + i;
      dr = it.lo_re[i] - it.hi_re[i]; di = it.lo_im[i] - it.hi_im[i];
      a = -2.0 * PI * n / 128.0;
      pr = 2.0 * (dr * $cos(a) - di * $sin(a));
      pi_ = 2.0 * (dr * $sin(a) + di * $cos(a));
      checks += 2;
      if (int'(g[i].re) != 2 * (it.lo_re[i] + it.hi_re[i]) || int'(g[i].im) != 2 * (it.lo_im[i] + it.hi_im[i])) begin
        failures++;
        $display("FAIL: g(%0d) = (%0d, %0d)", n, g[i].re, g[i].im);
      end
      if (rabs(real'(h[i].re) - pr) > 1.0 || rabs(real'(h[i].im) - pi_) > 1.0) begin
        failures++;
        $display("FAIL: h(%0d) = (%0d, %0d) expected (%.2f, %.2f)", n, h[i].re, h[i].im, pr, pi_);
      end
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
