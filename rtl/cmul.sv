// cmul: general complex multiplier, data x twiddle.
//
// Computes y = x * w where w is a twiddle factor in the fft_pkg coefficient
// format (14-bit signed, 12 fraction bits).  It is built from four real
// multipliers and two adders, and the result is rounded to nearest by adding
// half an LSB before the 12-bit arithmetic shift.  The output keeps the data
// width W: |w| <= 1 and the processor carries a guard bit, so the product
// always fits.  Purely combinational; the enclosing stage registers it.
// The multiplier itself is the ordinary four-multiplier form; the document
// does not give its insides.
module cmul
  import fft_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  input  coef_t               w,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);

  localparam int unsigned PW = W + CW + 1;

  logic signed [PW-1:0] acc_re, acc_im;

  always_comb begin
    acc_re = PW'(x_re) * PW'(w.re) - PW'(x_im) * PW'(w.im) + PW'(1 <<< (CFRAC - 1));
    acc_im = PW'(x_re) * PW'(w.im) + PW'(x_im) * PW'(w.re) + PW'(1 <<< (CFRAC - 1));
  end

  assign y_re = W'(acc_re >>> CFRAC);
  assign y_im = W'(acc_im >>> CFRAC);

endmodule
