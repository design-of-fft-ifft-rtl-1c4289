// tb_workload_uwb: runs the FFT/IFFT module, in its default configuration,
// on the three kinds of input used to evaluate the design:
//  1. word-length study: 800 symbols (102,400 samples) of uniformly random
//     full-range 5-bit complex input in FFT mode, back to back; the
//     quantisation SNR against an exact DFT must reach 22 dB (about 24.6 dB
//     is obtained: with this input about 1.6 % of the output components
//     exceed the 8-bit range and are clipped);
//  2. UWB OFDM transmit symbols: QPSK on the 122 used subcarriers (100 data,
//     12 pilot, 10 guard; subcarriers -61..61 without DC) in IFFT mode; the
//     SNR of the time-domain output against an exact inverse transform must
//     reach 20 dB;
//  3. a complex sine wave of amplitude 6 at bin 9 in FFT mode: its spectrum
//     is one impulse of 128*6/2 = 384, which must be clipped to about
//     (127, 0) by saturation in the last radix-8 butterfly; the clip also
//     disturbs the other outputs of that butterfly, so the remaining bins
//     must stay within 12 LSB of zero (about 11 is seen).
// Symbols stream at the full rate of one per 32 cycles. The stimulus comes
// from a hash of (symbol, index), so the checker rebuilds each symbol.
module tb_workload_uwb;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int NR = 800;        // random symbols
  localparam int NQ = 40;         // QPSK symbols
  localparam int NS = NR + NQ + 2;
  localparam real PI = 3.14159265358979323846;

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, ifft = 1'b0;
  cin_t   in_data [4];
  logic   out_valid, out_first, sat;
  cdata_t out_data [4];

  fft128_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real sp [3], ep [3];
  int  n_sat = 0;
  always @(posedge clk) if (sat) n_sat++;

  // reproducible pseudo-random integer in 0..range-1 for (symbol, index, salt),
  // so the checker can rebuild each symbol instead of storing it
  function automatic int rnd(input int s, input int n, input int salt, input int range);
    int unsigned h;
    h = 32'(s) * 32'h9E3779B1 ^ 32'(n) * 32'h85EBCA77 ^ 32'(salt) * 32'hC2B2AE3D;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12; h *= 32'h297A2D39; h ^= h >> 15;
    return int'(h % 32'(range));
  endfunction

  task automatic make_symbol(input int s, output int xr [128], output int xi [128],
                             output bit m, output int kind);
    if (s < NR) begin
      kind = 0; m = 0;
      for (int n = 0; n < 128; n++) begin
        xr[n] = rnd(s, n, 0, 32) - 16;
        xi[n] = rnd(s, n, 1, 32) - 16;
      end
    end else if (s < NR + NQ) begin
      kind = 1; m = 1;
      for (int k = 0; k < 128; k++) begin
        bit used;
        used = (k >= 1 && k <= 61) || (k >= 67);
        xr[k] = used ? (rnd(s, k, 2, 2) == 1 ? 5 : -5) : 0;
        xi[k] = used ? (rnd(s, k, 3, 2) == 1 ? 5 : -5) : 0;
      end
    end else begin
      kind = 2; m = 0;
      for (int n = 0; n < 128; n++) begin
        xr[n] = int'($floor(6.0 * $cos(2.0 * PI * 9.0 * n / 128.0) + 0.5));
        xi[n] = int'($floor(6.0 * $sin(2.0 * PI * 9.0 * n / 128.0) + 0.5));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) in_data[i] = '0;
    for (int i = 0; i < 3; i++) begin sp[i] = 0.0; ep[i] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      int xr [128], xi [128];
      bit m;
      int kind;
      make_symbol(s, xr, xi, m, kind);
      for (int b = 0; b < 32; b++) begin
        in_valid <= 1'b1;
        ifft     <= m;
        for (int i = 0; i < 4; i++) begin
          in_data[i].re <= XIN_W'(xr[4*b+i]);
          in_data[i].im <= XIN_W'(xi[4*b+i]);
        end
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  initial begin
    wait (rst_n);   // outputs are meaningful only once reset has been applied
    for (int s = 0; s < NS; s++) begin
      int xr [128], xi [128];
      real yr [128], yi [128];
      int kind;
      bit m;
      do @(posedge clk); while (!(out_valid && out_first));
      make_symbol(s, xr, xi, m, kind);
      dft128(xr, xi, yr, yi);
      for (int c = 0; c < 32; c++) begin
        if (c > 0) @(posedge clk);
        for (int q = 0; q < 4; q++) begin
          int n, k;
          real er, ei;
          n = 4 * c + q;
          k = m ? (128 - n) % 128 : n;
          er = real'(c_re(out_data[q])) - yr[k] / 2.0;
          ei = real'(c_im(out_data[q])) - yi[k] / 2.0;
          if (kind < 2) begin
            sp[kind] += (yr[k] * yr[k] + yi[k] * yi[k]) / 4.0;
            ep[kind] += er * er + ei * ei;
          end else begin
            checks++;
            if (k == 9) begin
              if (c_re(out_data[q]) < 120 || rabs(real'(c_im(out_data[q]))) > 8.0) begin
                failures++;
                $display("FAIL: sine peak (%0d, %0d) not saturated", c_re(out_data[q]), c_im(out_data[q]));
              end
            end else if (rabs(real'(c_re(out_data[q]))) > 12.0 || rabs(real'(c_im(out_data[q]))) > 12.0) begin
              failures++;
              $display("FAIL: sine leakage (%0d, %0d) in bin %0d", c_re(out_data[q]), c_im(out_data[q]), k);
            end
          end
        end
      end
    end
    begin
      real s0, s1;
      s0 = 10.0 * $log10(sp[0] / ep[0]);
      s1 = 10.0 * $log10(sp[1] / ep[1]);
      $display("random 5-bit FFT: %0d symbols, SQNR = %.2f dB (cycles with a clipped value: %0d)", NR, s0, n_sat);
      $display("QPSK IFFT:        %0d symbols, SQNR = %.2f dB (EVM = %.2f dB)", NQ, s1, -s1);
      checks += 2;
      if (s0 < 22.0) begin failures++; $display("FAIL: random-input SQNR too low"); end
      if (s1 < 20.0) begin failures++; $display("FAIL: QPSK SQNR too low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 32 + 400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
