// tb_reorder_buffer: feeds bursts in the core's output order, lane j of cycle
// t carrying the tag of bin X(16j + 2(t mod 8) + t/8), to a reorder buffer in
// natural 8-lane order (SPLIT = 0) and one in split order (SPLIT = 1),
// alternating FFT and IFFT mode, back to back (32 cycles apart) and after a
// gap. Each tag encodes its bin (re = bin, im = burst number), so every
// output lane is checked against the bin the order requires: n = 8m+q
// (SPLIT = 0) or 4m+q / 64+4m+q-4 (SPLIT = 1), and bin (128-n) mod 128 in
// IFFT mode. Latency from the first input to out_first must be 19 cycles.
module tb_reorder_buffer;
  import fft_pkg::*;
  localparam int NB = 6;
  localparam int LAT = 19;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, ifft = 1'b0;
  cdata_t in_data [8];
  logic ov0, of0, ov1, of1;
  cdata_t od0 [8], od1 [8];
  int checks = 0, failures = 0, n_ifft = 0, n_fft = 0;
  longint cyc = 0, start [NB];
  bit mode [NB];

  reorder_buffer #(.SPLIT(1'b0)) dut0 (.clk, .rst_n, .in_valid, .in_data, .ifft,
    .out_valid(ov0), .out_first(of0), .out_data(od0));
  reorder_buffer #(.SPLIT(1'b1)) dut1 (.clk, .rst_n, .in_valid, .in_data, .ifft,
    .out_valid(ov1), .out_first(of1), .out_data(od1));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int j = 0; j < 8; j++) in_data[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      mode[b] = (b % 2 == 1);
      if (b == 4) begin in_valid = 0; repeat (25) @(negedge clk); end
      for (int t = 0; t < 16; t++) begin
        in_valid = 1;
        ifft = mode[b];
        if (t == 0) start[b] = cyc;
        for (int j = 0; j < 8; j++) begin
          in_data[j].re = 8'(16 * j + 2 * (t % 8) + t / 8);
          in_data[j].im = 8'(b);
        end
        @(negedge clk);
      end
      in_valid = 0; ifft = 0;
      for (int j = 0; j < 8; j++) in_data[j] = '1;
      repeat (16) @(negedge clk);
    end
  end

  task automatic check_out(input int split, input int b, input int m, input cdata_t od [8]);
    for (int q = 0; q < 8; q++) begin
      int n, k;
      if (split == 0) n = 8 * m + q;
      else            n = (q < 4) ? 4 * m + q : 64 + 4 * m + q - 4;
      k = mode[b] ? (128 - n) % 128 : n;
      checks++;
      if (int'(od[q].re) != k || int'(od[q].im) != b) begin
        failures++;
        if (failures < 20)
          $display("FAIL: SPLIT=%0d burst %0d read %0d lane %0d: bin %0d of burst %0d, expected bin %0d",
                   split, b, m, q, od[q].re, od[q].im, k);
      end
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      do @(negedge clk); while (!of0);
      checks++;
      if (cyc - start[b] != LAT || !of1) begin
        failures++; $display("FAIL: burst %0d latency %0d", b, cyc - start[b]);
      end
      for (int m = 0; m < 16; m++) begin
        if (m > 0) @(negedge clk);
        checks++;
        if (!ov0 || !ov1) begin failures++; $display("FAIL: output gap"); end
        check_out(0, b, m, od0);
        check_out(1, b, m, od1);
      end
      if (mode[b]) n_ifft++; else n_fft++;
    end
    checks++;
    if (n_ifft == 0 || n_fft == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 40 + 300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
