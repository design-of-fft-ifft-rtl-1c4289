// tb_w8_mult: multiplies random 9-bit complex values by W8^1 and W8^3 and
// checks, one cycle later, the exact shift-and-add result (c = 45/64, two
// fraction bits kept, rounded half up) and that it is within 0.6 % of full
// scale of the true rotation by exp(-j pi/4) or exp(-j 3pi/4).
module tb_w8_mult;
  import fft_tb_pkg::*;
  localparam real C = 0.70710678118654752;
  logic clk = 1'b0, sel3 = 1'b0;
  logic signed [8:0] din_re = '0, din_im = '0;
  logic signed [11:0] dout_re, dout_im;
  int checks = 0, failures = 0;
  int a_q, b_q, s_q;

  w8_mult #(.W(9), .CF(2)) dut (.*);
  always #5 clk = ~clk;

  function automatic int cm(input int u);   // round(u*45/16), half up
    int p;
    p = u * 45 + 8;
    return (p >= 0) ? p / 16 : -((-p + 15) / 16);
  endfunction

  initial begin
    for (int i = 0; i < 300; i++) begin
      int a, b, er, ei;
      real tr, ti;
      @(negedge clk);
      a = int'($urandom_range(511)) - 256;
      b = int'($urandom_range(511)) - 256;
      din_re = 9'(a); din_im = 9'(b); sel3 = i[0];
      @(negedge clk);
      if (!i[0]) begin er = cm(a + b);  ei = cm(b - a); tr = C * (a + b); ti = C * (b - a); end
      else       begin er = cm(b - a);  ei = -cm(a + b); tr = C * (b - a); ti = -C * (a + b); end
      checks++;
      if (int'(dout_re) != er || int'(dout_im) != ei) begin
        failures++;
        $display("FAIL: (%0d, %0d) sel3=%0d got (%0d, %0d) expected (%0d, %0d)", a, b, sel3, dout_re, dout_im, er, ei);
      end
      checks++;
      if (rabs(dout_re / 4.0 - tr) > 3.0 || rabs(dout_im / 4.0 - ti) > 3.0) begin
        failures++;
        $display("FAIL: rotation error too large for (%0d, %0d)", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
