// tb_fft128_top: end-to-end test of the FFT/IFFT module in its default
// configuration (reorder buffer and output buffer present, 4 lanes out).
//
// Twelve symbols are sent: random symbols of several amplitudes in FFT and
// IFFT mode, back to back and with idle gaps, and a constant (DC) symbol
// whose bin 0 saturates. Every output sample is compared with an exact
// floating-point DFT (X(n)/2 for FFT mode, X((128-n) mod 128)/2 for IFFT
// mode) within a tolerance of a few LSBs for the fixed-point noise; the
// quantisation SNR over all random symbols must exceed 25 dB. Latency from
// first input beat to out_first must be 78 cycles, and each symbol must leave
// as 32 consecutive output cycles. The mechanisms exercised are counted:
// FFT symbols, IFFT symbols, back-to-back symbols, symbols after a gap,
// saturation events, and all five slot maps of the register set B2.
module tb_fft128_top;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int NS  = 12;
  localparam int LAT = 78;
  localparam real TOL = 6.0;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid = 1'b0, ifft = 1'b0;
  cin_t   in_data [4];
  logic   out_valid, out_first, sat;
  cdata_t out_data [4];

  fft128_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NS][128], xi [NS][128];
  real yr [NS][128], yi [NS][128];
  bit  mode [NS];
  int  gap  [NS];
  int  amp  [NS];
  longint start_cyc [NS];
  longint cyc = 0;
  int  n_fft = 0, n_ifft = 0, n_b2b = 0, n_gap = 0, n_sat = 0, n_done = 0;
  real sig_pow = 0.0, err_pow = 0.0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (sat) n_sat++;

  // slot maps of B2 used by the radix-8 passes (map number = symbol mod 5)
  bit [7:0] maps_seen = '0;
  always @(posedge clk) if (rst_n && dut.u_core.act) maps_seen[dut.u_core.rot] = 1'b1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // ---------------- stimulus ----------------
  initial begin
    for (int s = 0; s < NS; s++) begin
      mode[s] = (s % 3 == 1);
      gap[s]  = (s == 4 || s == 9) ? 7 + s : 0;
      amp[s]  = (s % 4 == 0) ? 10 : (s % 4 == 1) ? 8 : (s % 4 == 2) ? 11 : 4;
      for (int n = 0; n < 128; n++) begin
        if (s == 6) begin              // DC: X(0) = 128*15 saturates
          xr[s][n] = 15;
          xi[s][n] = -3;
        end else begin
          xr[s][n] = int'($urandom_range(2 * amp[s] - 1)) - amp[s];
          xi[s][n] = int'($urandom_range(2 * amp[s] - 1)) - amp[s];
        end
      end
      dft128(xr[s], xi[s], yr[s], yi[s]);
    end
    for (int i = 0; i < 4; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      if (gap[s] > 0) begin
        in_valid <= 1'b0;
        repeat (gap[s]) @(posedge clk);
        if (s > 0) n_gap++;
      end else if (s > 0) n_b2b++;
      for (int b = 0; b < 32; b++) begin
        in_valid <= 1'b1;
        ifft     <= mode[s];
        if (b == 0) start_cyc[s] = cyc + 1;   // beat 0 is on the input in the next cycle
        for (int i = 0; i < 4; i++) begin
          in_data[i].re <= XIN_W'(xr[s][4*b+i]);
          in_data[i].im <= XIN_W'(xi[s][4*b+i]);
        end
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // ---------------- output checker ----------------
  initial begin
    wait (rst_n);   // outputs are meaningful only once reset has been applied
    for (int s = 0; s < NS; s++) begin
      longint t0;
      do @(posedge clk); while (!(out_valid && out_first));
      t0 = cyc;
      checks++;
      if (t0 - start_cyc[s] != LAT)
        fail($sformatf("symbol %0d latency %0d, expected %0d", s, t0 - start_cyc[s], LAT));
      for (int c = 0; c < 32; c++) begin
        if (c > 0) @(posedge clk);
        checks++;
        if (!out_valid) fail($sformatf("symbol %0d: gap in output at cycle %0d", s, c));
        for (int q = 0; q < 4; q++) begin
          int n, k;
          real er, ei;
          n = 4 * c + q;
          k = mode[s] ? (128 - n) % 128 : n;
          checks++;
          if (!near(c_re(out_data[q]), yr[s][k], TOL) || !near(c_im(out_data[q]), yi[s][k], TOL))
            fail($sformatf("symbol %0d out %0d (bin %0d): got (%0d, %0d) expected (%.1f, %.1f)",
                           s, n, k, c_re(out_data[q]), c_im(out_data[q]),
                           ideal_out(yr[s][k]), ideal_out(yi[s][k])));
          if (s != 6) begin
            er = real'(c_re(out_data[q])) - yr[s][k] / 2.0;
            ei = real'(c_im(out_data[q])) - yi[s][k] / 2.0;
            err_pow += er * er + ei * ei;
            sig_pow += (yr[s][k] * yr[s][k] + yi[s][k] * yi[s][k]) / 4.0;
          end
        end
      end
      if (mode[s]) n_ifft++; else n_fft++;
      n_done++;
    end
    finish_tb();
  end

  task automatic finish_tb();
    real sqnr;
    sqnr = 10.0 * $log10(sig_pow / (err_pow + 1e-9));
    $display("symbols: fft=%0d ifft=%0d back_to_back=%0d after_gap=%0d saturation_cycles=%0d slot_maps=%0d SQNR=%.1f dB",
             n_fft, n_ifft, n_b2b, n_gap, n_sat, $countones(maps_seen), sqnr);
    checks++;
    if (sqnr < 25.0) fail($sformatf("SQNR %.1f dB below 25 dB", sqnr));
    checks += 6;
    if (n_fft == 0)  fail("no FFT-mode symbol");
    if (n_ifft == 0) fail("no IFFT-mode symbol");
    if (n_b2b < 5)   fail("fewer than five back-to-back symbols (slot maps not all used)");
    if (n_gap == 0)  fail("no symbol after an idle gap");
    if (n_sat == 0)  fail("saturation never happened");
    if (maps_seen != 8'h1F) fail($sformatf("slot maps used %b, expected all five", maps_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (NS * 60 + 400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d symbols", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
