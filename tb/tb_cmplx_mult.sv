// tb_cmplx_mult: drives the complex multiplier with a new random operand pair
// every cycle, including full-scale values that must saturate, and compares
// each result, three cycles later, with the product computed here in integer
// arithmetic: (ar*cr - ai*ci) / 2^6 rounded half up and clipped to 8 bits.
module tb_cmplx_mult;
  import fft_pkg::*;
  localparam int SH = 6;
  logic clk = 1'b0;
  logic signed [7:0] din_re = '0, din_im = '0, dout_re, dout_im;
  coef_t coef = '0;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0;
  int exp_re [$], exp_im [$];
  bit exp_sat [$];

  cmplx_mult #(.IN_W(8), .OUT_W(8), .OUT_SHIFT(SH)) dut (.*);
  always #5 clk = ~clk;

  function automatic int q(input longint v, output bit clip);
    longint r;
    r = (v + (1 << (SH - 1)));
    r = (r >= 0) ? r / (1 << SH) : -((-r + (1 << SH) - 1) / (1 << SH));   // floor
    clip = 0;
    if (r > 127)  begin r = 127;  clip = 1; end
    if (r < -128) begin r = -128; clip = 1; end
    return int'(r);
  endfunction

  initial begin
    for (int i = 0; i < 400; i++) begin
      int ar, ai, cr, ci;
      bit c1, c2;
      @(negedge clk);
      ar = (i % 10 == 0) ? -128 : int'($urandom_range(255)) - 128;
      ai = (i % 10 == 0) ? -128 : int'($urandom_range(255)) - 128;
      cr = (i % 10 == 0) ? 64 : int'($urandom_range(128)) - 64;
      ci = (i % 10 == 0) ? -64 : int'($urandom_range(128)) - 64;
      din_re = 8'(ar); din_im = 8'(ai); coef.re = 8'(cr); coef.im = 8'(ci);
      exp_re.push_back(q(longint'(ar * cr - ai * ci), c1));
      exp_im.push_back(q(longint'(ar * ci + ai * cr), c2));
      exp_sat.push_back(c1 | c2);
      if (i >= 3) check();
    end
    repeat (3) begin @(negedge clk); check(); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int er, ei;
    bit es;
    er = exp_re.pop_front(); ei = exp_im.pop_front(); es = exp_sat.pop_front();
    checks++;
    if (int'(dout_re) != er || int'(dout_im) != ei || sat != es) begin
      failures++;
      if (failures < 10)
        $display("FAIL: got (%0d, %0d, sat %0d) expected (%0d, %0d, sat %0d)", dout_re, dout_im, sat, er, ei, es);
    end
    if (sat) n_sat++;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
