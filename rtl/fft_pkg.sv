// fft_pkg: types, word lengths and arithmetic helpers shared by the 128-point
// FFT/IFFT datapath.
//
// Word lengths follow the 8-bit column of the word-length study: complex input
// samples are 5-bit two's complement per component, every stored intermediate
// value and the output are 8-bit per component, and requantisation always
// rounds to nearest and saturates ("anti-saturate") instead of wrapping.
// Twiddle factors are 8-bit signed values with 6 fraction bits (1.0 = 64),
// generated from a quarter-wave cosine table:
//   COS_Q[k] = round(64 * cos(2*pi*k/128)), k = 0..32.
// The fixed-point scaling of every point in the pipeline, in units of the
// input LSB, is:
//   A  radix-2 sum/difference       8 bit, LSB 1
//   B  after the W128 multiplier    8 bit, LSB 1/2
//   C  after the first radix-8 step 8 bit, LSB 1   (one bit scaled)
//   D  after the W64 multiplier     8 bit, LSB 1
//   E  after the second radix-8     8 bit, LSB 2   (one bit scaled)
// so the core output equals DFT(x)/2.
package fft_pkg;

  localparam int N_FFT  = 128;
  localparam int XIN_W   = 5;   // input component width
  localparam int DW     = 8;   // internal / output component width
  localparam int COEF_W = 8;   // twiddle component width
  localparam int COEF_F = 6;   // twiddle fraction bits

  typedef struct packed {
    logic signed [XIN_W-1:0] re;
    logic signed [XIN_W-1:0] im;
  } cin_t;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cdata_t;

  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  // round(64*cos(2*pi*k/128)) for k = 0..32
  localparam int COS_Q [0:32] = '{64, 64, 64, 63, 63, 62, 61, 60, 59, 58, 56,
                                  55, 53, 51, 49, 47, 45, 43, 41, 38, 36, 33,
                                  30, 27, 24, 22, 19, 16, 12,  9,  6,  3,  0};

  // cos(2*pi*n/128) scaled by 64, for any n (taken modulo 128)
  function automatic int cos128(input int n);
    int m;
    m = n & 127;
    if (m <= 32)       return  COS_Q[m];
    else if (m <= 64)  return -COS_Q[64 - m];
    else if (m <= 96)  return -COS_Q[m - 64];
    else               return  COS_Q[128 - m];
  endfunction

  // W128^n = cos(2*pi*n/128) - j*sin(2*pi*n/128), scaled by 64
  function automatic coef_t w128(input int n);
    coef_t c;
    c.re = COEF_W'(cos128(n));
    c.im = COEF_W'(-cos128(n - 32));   // sin(t) = cos(t - pi/2)
    return c;
  endfunction

  // Drop SHIFT LSBs of a WIDE-bit signed value with round-half-up, then
  // saturate to OUT_W bits. Returns the result sign-extended to 32 bits.
  function automatic logic signed [31:0] round_sat(input logic signed [31:0] v,
                                                   input int shift,
                                                   input int out_w);
    logic signed [31:0] r, hi, lo;
    if (shift > 0) r = (v + (32'sd1 <<< (shift - 1))) >>> shift;
    else           r = v;
    hi = (32'sd1 <<< (out_w - 1)) - 1;
    lo = -(32'sd1 <<< (out_w - 1));
    if (r > hi)      r = hi;
    else if (r < lo) r = lo;
    return r;
  endfunction

  // true when round_sat had to clip
  function automatic logic clips(input logic signed [31:0] v, input int shift,
                                 input int out_w);
    logic signed [31:0] r;
    if (shift > 0) r = (v + (32'sd1 <<< (shift - 1))) >>> shift;
    else           r = v;
    return (r > ((32'sd1 <<< (out_w - 1)) - 1)) || (r < -(32'sd1 <<< (out_w - 1)));
  endfunction

endpackage
