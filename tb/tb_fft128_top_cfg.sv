// tb_fft128_top_cfg: checks the three non-default output configurations of
// fft128_top side by side on the same input stream:
//   (a) USE_REORDER=0 USE_OUTBUF=0: 8 lanes in the core's DIF order, 56 cycles
//   (b) USE_REORDER=0 USE_OUTBUF=1: 4 lanes, core lanes 0..3 then 4..7, 59 cycles
//   (c) USE_REORDER=1 USE_OUTBUF=0: 8 lanes in natural (FFT) or reversed
//       (IFFT) order, 75 cycles
// (The default configuration is covered by tb_fft128_top.) Eight random
// symbols are sent, FFT and IFFT mode alternating in pairs, back to back and
// after a gap. Every output sample is compared with an exact DFT (X/2) within
// 6 LSB, and the latency from first input beat to out_first is checked per
// symbol. Without the reorder buffer the mode has no effect, so (a) and (b)
// always deliver X(k).
module tb_fft128_top_cfg;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int  NS  = 8;
  localparam real TOL = 6.0;

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, ifft = 1'b0;
  cin_t   in_data [4];
  logic   ov_a, of_a, ov_b, of_b, ov_c, of_c, sat_a, sat_b, sat_c;
  cdata_t od_a [8], od_b [4], od_c [8];

  fft128_top #(.USE_REORDER(1'b0), .USE_OUTBUF(1'b0)) dut_a (
    .clk, .rst_n, .in_valid, .in_data, .ifft,
    .out_valid(ov_a), .out_first(of_a), .out_data(od_a), .sat(sat_a));
  fft128_top #(.USE_REORDER(1'b0), .USE_OUTBUF(1'b1)) dut_b (
    .clk, .rst_n, .in_valid, .in_data, .ifft,
    .out_valid(ov_b), .out_first(of_b), .out_data(od_b), .sat(sat_b));
  fft128_top #(.USE_REORDER(1'b1), .USE_OUTBUF(1'b0)) dut_c (
    .clk, .rst_n, .in_valid, .in_data, .ifft,
    .out_valid(ov_c), .out_first(of_c), .out_data(od_c), .sat(sat_c));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, done = 0;
  int  xr [NS][128], xi [NS][128];
  real yr [NS][128], yi [NS][128];
  bit  mode [NS];
  longint start_cyc [NS];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // bin delivered by configuration cfg in output cycle c on lane q
  function automatic int bin_of(input int cfg, input int c, input int q, input bit m);
    case (cfg)
      0: return 16 * q + 2 * (c % 8) + c / 8;
      1: return (c < 16) ? 16 * q + 2 * (c % 8) + c / 8
                         : 16 * (q + 4) + 2 * ((c - 16) % 8) + (c - 16) / 8;
      default: return m ? (128 - (8 * c + q)) % 128 : 8 * c + q;
    endcase
  endfunction

  function automatic void check(input int cfg, input int s, input int c, input int q,
                                input logic [15:0] w);
    int k;
    k = bin_of(cfg, c, q, (cfg == 2) && mode[s]);
    checks++;
    if (!near(c_re(w), yr[s][k], TOL) || !near(c_im(w), yi[s][k], TOL)) begin
      failures++;
      if (failures < 20)
        $display("FAIL: config %0d symbol %0d cycle %0d lane %0d (bin %0d): got (%0d, %0d) expected (%.1f, %.1f)",
                 cfg, s, c, q, k, c_re(w), c_im(w), yr[s][k] / 2.0, yi[s][k] / 2.0);
    end
  endfunction

  function automatic void check_latency(input int cfg, input int s, input int lat);
    checks++;
    if (cyc - start_cyc[s] != longint'(lat)) begin
      failures++;
      $display("FAIL: config %0d symbol %0d latency %0d, expected %0d", cfg, s, cyc - start_cyc[s], lat);
    end
  endfunction

  // stimulus
  initial begin
    for (int s = 0; s < NS; s++) begin
      mode[s] = s[1];
      for (int n = 0; n < 128; n++) begin
        xr[s][n] = int'($urandom_range(15)) - 8;
        xi[s][n] = int'($urandom_range(15)) - 8;
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
        repeat (9) @(posedge clk);
      end
      for (int b = 0; b < 32; b++) begin
        in_valid <= 1'b1;
        ifft     <= mode[s];
        for (int i = 0; i < 4; i++) begin
          in_data[i].re <= XIN_W'(xr[s][4*b+i]);
          in_data[i].im <= XIN_W'(xi[s][4*b+i]);
        end
        if (b == 0) start_cyc[s] = cyc + 1;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // checkers, one per configuration
  initial begin
    wait (rst_n);
    for (int s = 0; s < NS; s++) begin
      do @(posedge clk); while (!(ov_a && of_a));
      check_latency(0, s, 56);
      for (int c = 0; c < 16; c++) begin
        if (c > 0) @(posedge clk);
        for (int q = 0; q < 8; q++) check(0, s, c, q, od_a[q]);
      end
    end
    done++;
  end

  initial begin
    wait (rst_n);
    for (int s = 0; s < NS; s++) begin
      do @(posedge clk); while (!(ov_b && of_b));
      check_latency(1, s, 59);
      for (int c = 0; c < 32; c++) begin
        if (c > 0) @(posedge clk);
        checks++;
        if (!ov_b) begin failures++; $display("FAIL: config 1 symbol %0d gap at cycle %0d", s, c); end
        for (int q = 0; q < 4; q++) check(1, s, c, q, od_b[q]);
      end
    end
    done++;
  end

  initial begin
    wait (rst_n);
    for (int s = 0; s < NS; s++) begin
      do @(posedge clk); while (!(ov_c && of_c));
      check_latency(2, s, 75);
      for (int c = 0; c < 16; c++) begin
        if (c > 0) @(posedge clk);
        for (int q = 0; q < 8; q++) check(2, s, c, q, od_c[q]);
      end
    end
    done++;
  end

  initial begin
    wait (done == 3);
    $display("configurations (a) (b) (c): %0d symbols each, FFT and IFFT mode", NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NS * 40 + 400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
