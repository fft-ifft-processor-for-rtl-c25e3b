// ifft_scale: the division block of the processor, the 1/N factor of the
// inverse transform.
//
// N = 128 is a power of two, so the division is an arithmetic right shift
// by SHIFT = 7 bits (the binary point moves by seven places; the result is
// rounded toward minus infinity).  When div is low the sample passes
// unchanged.  Using a shift follows the document; truncating rather than
// rounding is this design's choice.  Combinational, one sample.
module ifft_scale #(
  parameter int unsigned W     = 20,
  parameter int unsigned SHIFT = 7
) (
  input  logic                div,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  assign out_re = div ? (in_re >>> SHIFT) : in_re;
  assign out_im = div ? (in_im >>> SHIFT) : in_im;

endmodule
