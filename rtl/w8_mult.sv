// w8_mult: constant complex multiplier by W8^1 = (1 - j)*sqrt(2)/2 or, with
// sel3 = 1, by W8^3 = W8^1 * (-j), as used inside the radix-8 butterfly.
//
// (a + jb) * W8^1 = c*(a + b) + j*c*(b - a), c = sqrt(2)/2, so the rotation
// needs one adder, one subtractor and a multiplication by the constant c.
// c is approximated by 0.101101b = 45/64 = 0.703125, four shifted terms
// x/2 + x/8 + x/16 + x/64, i.e. three adders per component. The first two
// terms and the last two are summed before the pipeline register and the
// two partial sums after it, so the register sits in the middle of the
// constant multiplier. W8^3 is obtained by the free -j rotation
// (u + jv)(-j) = v - ju applied after the constant multiply.
//
// The result keeps CF fraction bits (it is the value times 2^CF, rounded).
// Timing: din/sel3 in cycle t, dout in cycle t+1 (one register).
module w8_mult #(
  parameter int W  = 9,   // input component width
  parameter int CF = 2    // fraction bits kept at the output
) (
  input  logic                    clk,
  input  logic signed [W-1:0]     din_re,
  input  logic signed [W-1:0]     din_im,
  input  logic                    sel3,
  output logic signed [W+CF:0]    dout_re,   // W+1 integer bits + CF fraction
  output logic signed [W+CF:0]    dout_im
);

  localparam int SW = W + 1;        // width of the pre-add
  localparam int MW = SW + 7;       // width of x*45

  logic signed [SW-1:0] u, v;       // a+b, b-a
  logic signed [MW-1:0] pu_hi, pu_lo, pv_hi, pv_lo;
  logic signed [MW-1:0] pu_hi_q, pu_lo_q, pv_hi_q, pv_lo_q;
  logic                 sel3_q;
  logic signed [MW-1:0] mu, mv;
  logic signed [W+CF:0] ru, rv;

  always_comb begin
    u = SW'(din_re) + SW'(din_im);
    v = SW'(din_im) - SW'(din_re);
    // x*45 = x*32 + x*8 + x*4 + x
    pu_hi = (MW'(u) <<< 5) + (MW'(u) <<< 3);
    pu_lo = (MW'(u) <<< 2) + MW'(u);
    pv_hi = (MW'(v) <<< 5) + (MW'(v) <<< 3);
    pv_lo = (MW'(v) <<< 2) + MW'(v);
  end

  always_ff @(posedge clk) begin
    pu_hi_q <= pu_hi;
    pu_lo_q <= pu_lo;
    pv_hi_q <= pv_hi;
    pv_lo_q <= pv_lo;
    sel3_q  <= sel3;
  end

  always_comb begin
    mu = pu_hi_q + pu_lo_q;                 // c*u * 64
    mv = pv_hi_q + pv_lo_q;
    // keep CF fraction bits, round to nearest
    ru = (W+CF+1)'((mu + (MW'(1) <<< (5 - CF))) >>> (6 - CF));
    rv = (W+CF+1)'((mv + (MW'(1) <<< (5 - CF))) >>> (6 - CF));
    if (sel3_q) begin
      dout_re = rv;
      dout_im = -ru;
    end else begin
      dout_re = ru;
      dout_im = rv;
    end
  end

endmodule
