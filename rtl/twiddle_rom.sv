// twiddle_rom: twiddle factor ROM of the first (radix-2) module.
//
// Returns W128^addr = cos(2*pi*addr/128) - j*sin(2*pi*addr/128) for a 7-bit
// exponent.  Only a quarter period of the cosine (33 words, fft_pkg::COSQ)
// is stored; the sine is read from the mirrored address of the same table
// and the other three quadrants are rebuilt by swapping real and imaginary
// parts and changing signs.  Storing part of a period and reconstructing the
// rest follows the document; the quarter-wave split is this design's choice.
// Combinational read (the address is known a cycle ahead in the caller).
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [6:0] addr,
  output coef_t      w
);

  assign w = w128(addr);

endmodule
