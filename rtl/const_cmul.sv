// const_cmul: one constant multiplier of the modified complex multiplier.
//
// Multiplies the real and imaginary parts of a sample by one fixed
// region-A constant pair (C, S) = (cos a, sin a) in the twiddle format and
// returns the four raw products xr*C, xi*S, xr*S, xi*C, unrounded.  Because
// C and S are parameters, synthesis reduces each product to shifts and
// adds.  The caller builds x*(C - jS) or x*(S - jC) from the products by
// choosing signs.  Using fixed constant multipliers follows the document;
// returning the four products is this design's choice.  Combinational.
module const_cmul
  import fft_pkg::*;
#(
  parameter int unsigned W = 17,
  parameter int          C = 4076,   // region-A constant a = 1 by default
  parameter int          S = 401,
  parameter int unsigned PW = W + CW + 1
) (
  input  logic signed [W-1:0]  x_re,
  input  logic signed [W-1:0]  x_im,
  output logic signed [PW-1:0] xr_c,
  output logic signed [PW-1:0] xi_s,
  output logic signed [PW-1:0] xr_s,
  output logic signed [PW-1:0] xi_c
);

  localparam logic signed [PW-1:0] KC = PW'(C);
  localparam logic signed [PW-1:0] KS = PW'(S);

  assign xr_c = PW'(x_re) * KC;
  assign xi_s = PW'(x_im) * KS;
  assign xr_s = PW'(x_re) * KS;
  assign xi_c = PW'(x_im) * KC;

endmodule
