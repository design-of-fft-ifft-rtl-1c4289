// tb_radix8_bf: feeds a new random set of eight 8-bit complex samples to the
// radix-8 butterfly every cycle and compares each output set, three cycles
// later, with the exact 8-point DFT divided by 2 (OUT_SHIFT = 1), within
// 1.5 LSB (the shift-and-add sqrt(2)/2 and the rounding). Every tenth set is
// full scale so that the outputs saturate; saturated outputs must be clipped
// to the 8-bit range and flagged.
module tb_radix8_bf;
  import fft_tb_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  logic signed [7:0] x_re [8], x_im [8], y_re [8], y_im [8];
  logic sat;
  int checks = 0, failures = 0, n_sat = 0;
  real er [$], ei [$];

  radix8_bf #(.IN_W(8), .OUT_W(8), .OUT_SHIFT(1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 300; i++) begin
      int xr [8], xi [8];
      @(negedge clk);
      for (int n = 0; n < 8; n++) begin
        if (i % 10 == 5) begin xr[n] = 120; xi[n] = -100; end
        else begin
          xr[n] = int'($urandom_range(63)) - 32;
          xi[n] = int'($urandom_range(63)) - 32;
        end
        x_re[n] = 8'(xr[n]); x_im[n] = 8'(xi[n]);
      end
      for (int l = 0; l < 8; l++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < 8; n++) begin
          real a;
          a = -2.0 * PI * real'((l * n) % 8) / 8.0;
          sr += xr[n] * $cos(a) - xi[n] * $sin(a);
          si += xr[n] * $sin(a) + xi[n] * $cos(a);
        end
        er.push_back(sr / 2.0);
        ei.push_back(si / 2.0);
      end
      if (i >= 3) check();
    end
    repeat (3) begin @(negedge clk); check(); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clip(input real v);
    return (v > 127.0) ? 127.0 : (v < -128.0) ? -128.0 : v;
  endfunction

  task automatic check();
    bit any_clip;
    any_clip = 0;
    for (int l = 0; l < 8; l++) begin
      real vr, vi;
      vr = er.pop_front(); vi = ei.pop_front();
      if (vr > 127.5 || vr < -128.5 || vi > 127.5 || vi < -128.5) any_clip = 1;
      checks++;
      if (rabs(real'(y_re[l]) - clip(vr)) > 1.5 || rabs(real'(y_im[l]) - clip(vi)) > 1.5) begin
        failures++;
        if (failures < 10) $display("FAIL: Y[%0d] = (%0d, %0d) expected (%.2f, %.2f)", l, y_re[l], y_im[l], vr, vi);
      end
    end
    checks++;
    if (any_clip && !sat) begin failures++; $display("FAIL: saturation not flagged"); end
    if (sat) n_sat++;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
