// twiddle_rom: combinational twiddle-factor table W128^idx.
//
// Returns W128^idx = cos(2*pi*idx/128) - j*sin(2*pi*idx/128) as two 8-bit
// signed components with 6 fraction bits (1.0 = 64). The W64^m factors of the
// radix-8 stage are W128^(2m). The table is not stored: every entry is built
// from the 33-entry quarter-wave cosine table of fft_pkg by symmetry, so a
// synthesis tool reduces it to a small constant ROM.
// No clock; the coefficient follows idx in the same cycle.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [6:0] idx,
  output coef_t      coef
);

  always_comb coef = w128(int'(idx));

endmodule
