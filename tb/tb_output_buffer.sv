// tb_output_buffer: sends bursts of 16 cycles of eight tagged samples (lane j
// of cycle t tagged 8t+j, burst number in the imaginary part), 32 cycles
// apart and after a gap, and checks that each burst leaves as 32 consecutive
// cycles of four samples: lanes 0..3 of input cycles 0..15 first, then lanes
// 4..7 of input cycles 0..15, starting 3 cycles after the first input
// (back-to-back bursts therefore leave as one unbroken stream).
module tb_output_buffer;
  import fft_pkg::*;
  localparam int NB = 5;
  localparam int LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cdata_t in_data [8], out_data [4];
  logic out_valid, out_first;
  int checks = 0, failures = 0;
  longint cyc = 0, start [NB];

  output_buffer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int j = 0; j < 8; j++) in_data[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      if (b == 3) begin in_valid = 0; repeat (11) @(negedge clk); end
      for (int t = 0; t < 16; t++) begin
        in_valid = 1;
        if (t == 0) start[b] = cyc;
        for (int j = 0; j < 8; j++) begin
          in_data[j].re = 8'(8 * t + j);
          in_data[j].im = 8'(b);
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (16) @(negedge clk);
    end
  end

  initial begin
    wait (rst_n);   // outputs are meaningful only once reset has been applied
    for (int b = 0; b < NB; b++) begin
      do @(negedge clk); while (!out_first);
      checks++;
      if (cyc - start[b] != LAT) begin failures++; $display("FAIL: burst %0d latency %0d", b, cyc - start[b]); end
      for (int c = 0; c < 32; c++) begin
        if (c > 0) @(negedge clk);
        checks++;
        if (!out_valid) begin failures++; $display("FAIL: output gap burst %0d cycle %0d", b, c); end
        for (int q = 0; q < 4; q++) begin
          int tag;
          tag = (c < 16) ? 8 * c + q : 8 * (c - 16) + 4 + q;
          checks++;
          if (int'(out_data[q].re) != tag || int'(out_data[q].im) != b) begin
            failures++;
            if (failures < 20) $display("FAIL: burst %0d cycle %0d lane %0d: got %0d/%0d expected %0d", b, c, q, out_data[q].re, out_data[q].im, tag);
          end
        end
      end
    end
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
