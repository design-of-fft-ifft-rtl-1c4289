// tb_twiddle_rom: checks all 128 twiddle factors W128^n against
// 64*cos(2 pi n/128) and -64*sin(2 pi n/128) computed in floating point; each
// component must be the nearest integer (error at most 0.5).
module tb_twiddle_rom;
  import fft_pkg::*;
  import fft_tb_pkg::rabs;
  localparam real PI = 3.14159265358979323846;
  logic [6:0] idx;
  coef_t coef;
  int checks = 0, failures = 0;

  twiddle_rom dut (.*);

  initial begin
    for (int n = 0; n < 128; n++) begin
      real cr, ci;
      idx = 7'(n);
      #1;
      cr = 64.0 * $cos(2.0 * PI * n / 128.0);
      ci = -64.0 * $sin(2.0 * PI * n / 128.0);
      checks++;
      if (rabs(real'(coef.re) - cr) > 0.5001 || rabs(real'(coef.im) - ci) > 0.5001) begin
        failures++;
        $display("FAIL: W128^%0d = (%0d, %0d), expected (%.2f, %.2f)", n, coef.re, coef.im, cr, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
