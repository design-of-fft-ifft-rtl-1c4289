// radix2_stage: first stage of the 128-point DIF FFT, four radix-2 butterflies
// and four W128 twiddle multipliers working on four sample pairs per cycle.
//
// For n = 4*grp + lane it forms  g(n) = x(n) + x(n+64)  and
// h(n) = (x(n) - x(n+64)) * W128^n.  The even outputs X(2k) of the 128-point
// transform are the 64-point DFT of g, the odd outputs X(2k+1) that of h.
// The sums are kept exactly (6 bits, held in 8); the products and g leave
// with one fraction bit (8 bits, LSB = 1/2 of an input LSB), rounded and
// saturated in the multiplier.
//
// Timing: one register after the butterflies, then the three-cycle complex
// multiplier: operands in cycle t, results in cycle t+4. tag_in travels with
// the data unchanged (the caller's write address and symbol information).
module radix2_stage
  import fft_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [3:0]       in_grp,
  input  logic [TAG_W-1:0] in_tag,
  input  cin_t             x_lo [4],
  input  cin_t             x_hi [4],
  output logic             out_valid,
  output logic [3:0]       out_grp,
  output logic [TAG_W-1:0] out_tag,
  output cdata_t           g [4],
  output cdata_t           h [4],
  output logic             sat
);

  localparam int LAT = 4;

  cdata_t sum_q [4], dif_q [4];
  coef_t  coef [4], coef_q [4];
  cdata_t g_d [3][4];
  logic   msat [4];
  logic             v_d   [LAT];
  logic [3:0]       grp_d [LAT];
  logic [TAG_W-1:0] tag_d [LAT];

  for (genvar i = 0; i < 4; i++) begin : g_tw
    twiddle_rom u_rom (.idx({1'b0, in_grp, 2'(i)}), .coef(coef[i]));
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      sum_q[i].re <= DW'(x_lo[i].re) + DW'(x_hi[i].re);
      sum_q[i].im <= DW'(x_lo[i].im) + DW'(x_hi[i].im);
      dif_q[i].re <= DW'(x_lo[i].re) - DW'(x_hi[i].re);
      dif_q[i].im <= DW'(x_lo[i].im) - DW'(x_hi[i].im);
      // g to the multiplier output format (one fraction bit)
      g_d[0][i].re <= sum_q[i].re <<< 1;
      g_d[0][i].im <= sum_q[i].im <<< 1;
    end
    coef_q  <= coef;
    g_d[1]  <= g_d[0];
    g_d[2]  <= g_d[1];
  end

  for (genvar i = 0; i < 4; i++) begin : g_mul
    cmplx_mult #(.IN_W(DW), .OUT_W(DW), .OUT_SHIFT(COEF_F - 1)) u_mul (
      .clk, .din_re(dif_q[i].re), .din_im(dif_q[i].im), .coef(coef_q[i]),
      .dout_re(h[i].re), .dout_im(h[i].im), .sat(msat[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) v_d[k] <= 1'b0;
    end else begin
      v_d[0] <= in_valid;
      for (int k = 1; k < LAT; k++) v_d[k] <= v_d[k-1];
    end
  end

  always_ff @(posedge clk) begin
    grp_d[0] <= in_grp;
    tag_d[0] <= in_tag;
    for (int k = 1; k < LAT; k++) begin
      grp_d[k] <= grp_d[k-1];
      tag_d[k] <= tag_d[k-1];
    end
  end

  always_comb begin
    g         = g_d[2];
    out_valid = v_d[LAT-1];
    out_grp   = grp_d[LAT-1];
    out_tag   = tag_d[LAT-1];
    sat       = v_d[LAT-1] && (msat[0] | msat[1] | msat[2] | msat[3]);
  end

endmodule
