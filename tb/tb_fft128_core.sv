// tb_fft128_core: checks the 128-point FFT core on its own.
//
// Eight random symbols (back to back, and one after an idle gap) plus one
// saturating DC symbol are transformed. The core output is in
// decimation-in-frequency order: in output cycle t lane k must carry
// X(16k + 2(t mod 8) + t/8)/2, compared with an exact floating-point DFT
// within 4 LSBs. The first output (out_first) must come 56 cycles after the
// first input beat and a symbol must leave in 16 consecutive cycles.
module tb_fft128_core;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int NS  = 9;
  localparam int LAT = 56;
  localparam real TOL = 6.0;

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cin_t   in_data [4];
  logic   out_valid, out_first, sat;
  cdata_t out_data [8];

  fft128_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;
  int xr [NS][128], xi [NS][128];
  real yr [NS][128], yi [NS][128];
  longint start_cyc [NS];
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (sat) n_sat++;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      for (int n = 0; n < 128; n++) begin
        if (s == 3) begin
          xr[s][n] = -16;
          xi[s][n] = 9;
        end else begin
          xr[s][n] = int'($urandom_range(23)) - 12;
          xi[s][n] = int'($urandom_range(23)) - 12;
        end
      end
      dft128(xr[s], xi[s], yr[s], yi[s]);
    end
    for (int i = 0; i < 4; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      if (s == 5) begin
        in_valid <= 1'b0;
        repeat (13) @(posedge clk);
      end
      for (int b = 0; b < 32; b++) begin
        in_valid <= 1'b1;
        if (b == 0) start_cyc[s] = cyc + 1;
        for (int i = 0; i < 4; i++) begin
          in_data[i].re <= XIN_W'(xr[s][4*b+i]);
          in_data[i].im <= XIN_W'(xi[s][4*b+i]);
        end
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  initial begin
    wait (rst_n);   // outputs are meaningful only once reset has been applied
    for (int s = 0; s < NS; s++) begin
      do @(posedge clk); while (!(out_valid && out_first));
      checks++;
      if (cyc - start_cyc[s] != LAT)
        fail($sformatf("symbol %0d latency %0d, expected %0d", s, cyc - start_cyc[s], LAT));
      for (int t = 0; t < 16; t++) begin
        if (t > 0) @(posedge clk);
        checks++;
        if (!out_valid) fail($sformatf("symbol %0d: output gap at cycle %0d", s, t));
        for (int q = 0; q < 8; q++) begin
          int k;
          k = 16 * q + 2 * (t % 8) + t / 8;
          checks++;
          if (!near(c_re(out_data[q]), yr[s][k], TOL) || !near(c_im(out_data[q]), yi[s][k], TOL))
            fail($sformatf("symbol %0d t=%0d lane %0d (bin %0d): got (%0d, %0d) expected (%.1f, %.1f)",
                           s, t, q, k, c_re(out_data[q]), c_im(out_data[q]),
                           ideal_out(yr[s][k]), ideal_out(yi[s][k])));
        end
      end
    end
    checks++;
    if (n_sat == 0) fail("saturation flag never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 50 + 300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
