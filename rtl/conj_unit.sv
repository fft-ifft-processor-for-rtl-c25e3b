// conj_unit: conjugate block with its bypass multiplexer.
//
// When conj is high the sign of the imaginary part is changed, otherwise the
// sample passes unchanged.  The processor places one in front of the FFT
// core (input conjugation for an IFFT) and one behind it, which is how the
// same forward datapath computes the inverse transform, as in the document.
// Callers must not present the most negative imaginary value; the core
// sign-extends its inputs by a guard bit before conjugating, so it never
// does.  Combinational, one sample.
module conj_unit #(
  parameter int unsigned W = 13
) (
  input  logic                conj,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  assign out_re = in_re;
  assign out_im = conj ? -in_im : in_im;

endmodule
