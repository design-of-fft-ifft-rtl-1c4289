// radix8_bf: pipelined 8-point DFT butterfly, Y[l] = sum_n x[n] * W8^(l*n),
// built as three radix-2 steps (radix-2^3 decimation in frequency).
//
// Step 1: a[n] = x[n] + x[n+4], b[n] = (x[n] - x[n+4]) * W8^n, n = 0..3.
//         W8^0 is free, W8^2 = -j is a swap and negate, W8^1 and W8^3 use
//         the shift-and-add constant multiplier w8_mult.
// Step 2: 4-point butterflies on a and on b with the trivial factor -j.
// Step 3: 2-point butterflies. Results are put back in natural order.
// Altogether 12 radix-2 butterflies and two constant multipliers.
//
// Pipeline: register 1 after step 1, register 2 in the middle of the
// constant multipliers, register 3 on the output, so x presented in cycle t
// gives y in cycle t+3, one new set of eight inputs per cycle. The output is
// the exact sum (CF = 2 fraction bits kept after the constant multiply) with
// OUT_SHIFT LSBs dropped, rounded to nearest and saturated to OUT_W bits;
// sat flags a clipped output. Stage placement follows the three-stage
// butterfly pipeline of the design; widths and rounding are this design's.
module radix8_bf
  import fft_pkg::*;
#(
  parameter int IN_W      = 8,
  parameter int OUT_W     = 8,
  parameter int OUT_SHIFT = 1
) (
  input  logic                     clk,
  input  logic signed [IN_W-1:0]   x_re [8],
  input  logic signed [IN_W-1:0]   x_im [8],
  output logic signed [OUT_W-1:0]  y_re [8],
  output logic signed [OUT_W-1:0]  y_im [8],
  output logic                     sat
);

  localparam int CF = 2;
  localparam int W1 = IN_W + 1;          // after step 1
  localparam int WI = IN_W + 4 + CF;     // working width of steps 2 and 3

  // ---- step 1 ---------------------------------------------------------
  logic signed [W1-1:0] a_re [4], a_im [4], d_re [4], d_im [4];
  logic signed [W1-1:0] a_re_q [4], a_im_q [4], d_re_q [4], d_im_q [4];

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      a_re[n] = W1'(x_re[n]) + W1'(x_re[n+4]);
      a_im[n] = W1'(x_im[n]) + W1'(x_im[n+4]);
      d_re[n] = W1'(x_re[n]) - W1'(x_re[n+4]);
      d_im[n] = W1'(x_im[n]) - W1'(x_im[n+4]);
    end
  end

  always_ff @(posedge clk) begin
    a_re_q <= a_re;
    a_im_q <= a_im;
    d_re_q <= d_re;
    d_im_q <= d_im;
  end

  // ---- twiddles of step 1 and register 2 -------------------------------
  logic signed [WI-1:0] a2_re [4], a2_im [4];       // a, scaled by 2^CF
  logic signed [WI-1:0] b0_re, b0_im, b2_re, b2_im; // b[0], b[2]
  logic signed [W1+CF:0] m1_re, m1_im, m3_re, m3_im;

  w8_mult #(.W(W1), .CF(CF)) u_w81 (
    .clk, .din_re(d_re_q[1]), .din_im(d_im_q[1]), .sel3(1'b0),
    .dout_re(m1_re), .dout_im(m1_im));
  w8_mult #(.W(W1), .CF(CF)) u_w83 (
    .clk, .din_re(d_re_q[3]), .din_im(d_im_q[3]), .sel3(1'b1),
    .dout_re(m3_re), .dout_im(m3_im));

  always_ff @(posedge clk) begin
    for (int n = 0; n < 4; n++) begin
      a2_re[n] <= WI'(a_re_q[n]) <<< CF;
      a2_im[n] <= WI'(a_im_q[n]) <<< CF;
    end
    b0_re <= WI'(d_re_q[0]) <<< CF;
    b0_im <= WI'(d_im_q[0]) <<< CF;
    b2_re <= WI'(d_im_q[2]) <<< CF;          // (x)(-j) = im - j*re
    b2_im <= -(WI'(d_re_q[2]) <<< CF);
  end

  // ---- steps 2 and 3, output rounding, register 3 ------------------------
  logic signed [WI-1:0] b1_re, b1_im, b3_re, b3_im;
  logic signed [WI-1:0] c0_re, c0_im, c1_re, c1_im, e0_re, e0_im, e1_re, e1_im;
  logic signed [WI-1:0] f0_re, f0_im, f1_re, f1_im, g0_re, g0_im, g1_re, g1_im;
  logic signed [31:0]   s_re [8], s_im [8];
  logic                 sat_c;

  always_comb begin
    b1_re = WI'(m1_re);  b1_im = WI'(m1_im);
    b3_re = WI'(m3_re);  b3_im = WI'(m3_im);
    // even half: 4-point DFT of a
    c0_re = a2_re[0] + a2_re[2];  c0_im = a2_im[0] + a2_im[2];
    c1_re = a2_re[1] + a2_re[3];  c1_im = a2_im[1] + a2_im[3];
    e0_re = a2_re[0] - a2_re[2];  e0_im = a2_im[0] - a2_im[2];
    e1_re = a2_im[1] - a2_im[3];  e1_im = a2_re[3] - a2_re[1];   // *(-j)
    // odd half: 4-point DFT of b
    f0_re = b0_re + b2_re;  f0_im = b0_im + b2_im;
    f1_re = b1_re + b3_re;  f1_im = b1_im + b3_im;
    g0_re = b0_re - b2_re;  g0_im = b0_im - b2_im;
    g1_re = b1_im - b3_im;  g1_im = b3_re - b1_re;               // *(-j)
    // step 3
    s_re[0] = 32'(c0_re) + 32'(c1_re);  s_im[0] = 32'(c0_im) + 32'(c1_im);
    s_re[4] = 32'(c0_re) - 32'(c1_re);  s_im[4] = 32'(c0_im) - 32'(c1_im);
    s_re[2] = 32'(e0_re) + 32'(e1_re);  s_im[2] = 32'(e0_im) + 32'(e1_im);
    s_re[6] = 32'(e0_re) - 32'(e1_re);  s_im[6] = 32'(e0_im) - 32'(e1_im);
    s_re[1] = 32'(f0_re) + 32'(f1_re);  s_im[1] = 32'(f0_im) + 32'(f1_im);
    s_re[5] = 32'(f0_re) - 32'(f1_re);  s_im[5] = 32'(f0_im) - 32'(f1_im);
    s_re[3] = 32'(g0_re) + 32'(g1_re);  s_im[3] = 32'(g0_im) + 32'(g1_im);
    s_re[7] = 32'(g0_re) - 32'(g1_re);  s_im[7] = 32'(g0_im) - 32'(g1_im);
    sat_c = 1'b0;
    for (int l = 0; l < 8; l++)
      sat_c |= clips(s_re[l], CF + OUT_SHIFT, OUT_W) | clips(s_im[l], CF + OUT_SHIFT, OUT_W);
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < 8; l++) begin
      y_re[l] <= OUT_W'(round_sat(s_re[l], CF + OUT_SHIFT, OUT_W));
      y_im[l] <= OUT_W'(round_sat(s_im[l], CF + OUT_SHIFT, OUT_W));
    end
    sat <= sat_c;
  end

endmodule
