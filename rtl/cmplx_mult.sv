// cmplx_mult: general complex twiddle-factor multiplier.
//
// Computes (ar + j*ai) * (cr + j*ci) with four real multipliers and two
// adders:  re = ar*cr - ai*ci,  im = ar*ci + ai*cr.  The coefficient has
// COEF_F fraction bits; the product is brought back to OUT_W bits by dropping
// OUT_SHIFT LSBs with round-to-nearest and saturation.
//
// Timing: three register stages (operands, products, rounded sum), so the
// result of the operands presented in cycle t is on dout in cycle t+3. The
// unit is fully pipelined and accepts new operands every cycle. sat flags a
// result that had to be clipped and is aligned with dout.
// The four-multiplier form and the three-cycle latency follow the chosen
// multiplier of the design study; OUT_SHIFT and saturation are this design's
// fixed-point choices.
module cmplx_mult
  import fft_pkg::*;
#(
  parameter int IN_W      = 8,
  parameter int OUT_W     = 8,
  parameter int OUT_SHIFT = 6
) (
  input  logic                     clk,
  input  logic signed [IN_W-1:0]   din_re,
  input  logic signed [IN_W-1:0]   din_im,
  input  coef_t                    coef,
  output logic signed [OUT_W-1:0]  dout_re,
  output logic signed [OUT_W-1:0]  dout_im,
  output logic                     sat
);

  localparam int PW = IN_W + COEF_W;

  logic signed [IN_W-1:0]   ar_q, ai_q;
  coef_t                    c_q;
  logic signed [PW-1:0]     p_rr, p_ii, p_ri, p_ir;
  logic signed [31:0]       sum_re, sum_im;

  always_ff @(posedge clk) begin
    ar_q <= din_re;
    ai_q <= din_im;
    c_q  <= coef;
    p_rr <= PW'(ar_q * c_q.re);
    p_ii <= PW'(ai_q * c_q.im);
    p_ri <= PW'(ar_q * c_q.im);
    p_ir <= PW'(ai_q * c_q.re);
    dout_re <= OUT_W'(round_sat(sum_re, OUT_SHIFT, OUT_W));
    dout_im <= OUT_W'(round_sat(sum_im, OUT_SHIFT, OUT_W));
    sat     <= clips(sum_re, OUT_SHIFT, OUT_W) | clips(sum_im, OUT_SHIFT, OUT_W);
  end

  always_comb begin
    sum_re = 32'(p_rr) - 32'(p_ii);
    sum_im = 32'(p_ri) + 32'(p_ir);
  end

endmodule
