// w8_rot: multiplier by the radix-8 internal twiddles W8^sel, sel = 0..3.
//
// W8^0 = 1 and W8^2 = -j are trivial (wiring and a negation).  W8^1 =
// (1-j)/sqrt(2) and W8^3 = (-1-j)/sqrt(2) need one add/subtract of the real
// and imaginary parts followed by a multiplication by the single constant
// 1/sqrt(2) (2896/4096, rounded to nearest).  These are the cheap "trivial"
// twiddles that sit between the BU2 steps of a radix-8 butterfly; the
// implementation as one shared constant multiplier is this design's choice.
// Combinational, output width equals input width W.
module w8_rot
  import fft_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [1:0]          sel,
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);

  localparam int unsigned PW = W + CW + 2;

  localparam logic signed [PW-1:0] HALF = PW'(1 <<< (CFRAC - 1));

  logic signed [W:0]   s, d;      // a + b, b - a
  logic signed [W-1:0] ps, pd;    // scaled by 1/sqrt(2), rounded

  always_comb begin
    s  = (W+1)'(x_re) + (W+1)'(x_im);
    d  = (W+1)'(x_im) - (W+1)'(x_re);
    ps = W'((PW'(s) * PW'(INV_SQRT2) + HALF) >>> CFRAC);
    pd = W'((PW'(d) * PW'(INV_SQRT2) + HALF) >>> CFRAC);
    unique case (sel)
      2'd0: begin y_re = x_re;     y_im = x_im;      end
      2'd1: begin y_re = ps;      y_im = pd;        end
      2'd2: begin y_re = x_im;     y_im = -x_re;     end
      default: begin y_re = pd;   y_im = -ps;       end
    endcase
  end

endmodule
