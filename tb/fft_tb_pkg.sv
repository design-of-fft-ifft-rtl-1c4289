// fft_tb_pkg: reference arithmetic for the FFT testbenches.
//
// dft128() computes the exact 128-point DFT X(k) = sum x(n) exp(-j 2 pi n k/128)
// in floating point, independently of the fixed-point datapath. The design
// outputs X(k)/2 rounded to 8 bits and saturated to -128..127; near() accepts
// a component that differs from that ideal value by at most tol LSBs.
// c_re()/c_im() split an output word into its two signed parts.
package fft_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic void dft128(input int xr [128], input int xi [128],
                                 output real yr [128], output real yi [128]);
    for (int k = 0; k < 128; k++) begin
      real sr, si, ang;
      sr = 0.0;
      si = 0.0;
      for (int n = 0; n < 128; n++) begin
        ang = -2.0 * PI * real'((n * k) % 128) / 128.0;
        sr += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        si += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
      yr[k] = sr;
      yi[k] = si;
    end
  endfunction

  // ideal 8-bit output for a DFT component: value/2, clipped
  function automatic real ideal_out(input real v);
    real h;
    h = v / 2.0;
    if (h > 127.0)  h = 127.0;
    if (h < -128.0) h = -128.0;
    return h;
  endfunction

  function automatic bit near(input int got, input real v, input real tol);
    real d;
    d = real'(got) - ideal_out(v);
    if (d < 0.0) d = -d;
    return d <= tol;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // real and imaginary parts of an output sample as integers, taken as
  // explicit bit fields of the 16-bit word {re, im}
  function automatic int c_re(input logic [15:0] w);
    return int'($signed(w[15:8]));
  endfunction

  function automatic int c_im(input logic [15:0] w);
    return int'($signed(w[7:0]));
  endfunction

endpackage
