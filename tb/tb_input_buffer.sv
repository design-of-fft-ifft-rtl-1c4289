// tb_input_buffer: sends four random symbols (three back to back, one after a
// gap) and checks that in the cycle after input beat 16+c the buffer presents
// x(4c+i) and x(4c+i+64) on lane i with pair_grp = c, pair_last on c = 15,
// sym_last on beat 31, and nothing during beats 0..15.
module tb_input_buffer;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cin_t in_data [4], pair_lo [4], pair_hi [4];
  logic sym_last, pair_valid, pair_last;
  logic [3:0] pair_grp;
  int checks = 0, failures = 0, n_pairs = 0;
  cin_t x [128];

  input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 4; i++) in_data[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      if (s == 3) begin in_valid = 0; repeat (9) @(negedge clk); end
      for (int n = 0; n < 128; n++) x[n] = cin_t'($urandom);
      for (int b = 0; b < 32; b++) begin
        in_valid = 1;
        for (int i = 0; i < 4; i++) in_data[i] = x[4 * b + i];
        #1;
        checks++;
        if (sym_last != (b == 31)) begin failures++; $display("FAIL: sym_last at beat %0d", b); end
        @(negedge clk);
        // the next beat's data is already on the input when the pair is checked
        for (int i = 0; i < 4; i++) in_data[i] = cin_t'($urandom);
        #1;
        checks++;
        if (pair_valid != (b >= 16)) begin failures++; $display("FAIL: pair_valid after beat %0d", b); end
        if (b >= 16) begin
          int c;
          c = b - 16;
          n_pairs++;
          checks++;
          if (pair_grp != 4'(c) || pair_last != (c == 15)) begin
            failures++; $display("FAIL: pair_grp %0d / last %0d after beat %0d", pair_grp, pair_last, b);
          end
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (pair_lo[i] != x[4 * c + i] || pair_hi[i] != x[4 * c + i + 64]) begin
              failures++; $display("FAIL: pair %0d lane %0d wrong", c, i);
            end
          end
        end
      end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (n_pairs != 64) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
