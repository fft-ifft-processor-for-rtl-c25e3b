// sdf_bu2: one radix-2 butterfly step with a delay-feedback (single-path
// delay feedback, SDF) buffer of D words.
//
// The input stream is split in blocks of 2*D samples.  During the first D
// samples of a block (phase = 0) each input is parked in the feedback
// buffer while the buffer's oldest word, a difference from the previous
// block, is sent out after multiplication by W8^rot.  During the second D
// samples (phase = 1) the parked sample a and the new input b meet: a + b is
// sent out at once and a - b goes into the buffer.  So the output stream is
// the input stream delayed by D samples with sums in the first half and
// differences in the second half of every block.
// Interface: en advances the whole stage (stall when low), phase is the
// D-weight bit of the input sample's index, rot selects the trivial
// twiddle applied to outgoing differences.  The output is registered and
// one bit wider than the input.  Latency: D + 1 enabled cycles.
// The delay-feedback BU2 with its delay element is the document's building
// block; the single shared rotator on the output is this design's choice.
module sdf_bu2
  import fft_pkg::*;
#(
  parameter int unsigned W = 14,
  parameter int unsigned D = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                phase,
  input  logic [1:0]          rot,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W:0]   out_re,
  output logic signed [W:0]   out_im
);

  logic signed [W:0] buf_re [D];
  logic signed [W:0] buf_im [D];
  logic signed [W:0] head_re, head_im, a_re, a_im, b_re, b_im;
  logic signed [W:0] sel_re, sel_im, rot_re, rot_im, fb_re, fb_im;

  assign head_re = buf_re[D-1];
  assign head_im = buf_im[D-1];
  assign b_re    = (W+1)'(in_re);
  assign b_im    = (W+1)'(in_im);
  assign a_re    = head_re;
  assign a_im    = head_im;

  always_comb begin
    if (phase) begin
      sel_re = a_re + b_re;
      sel_im = a_im + b_im;
      fb_re  = a_re - b_re;
      fb_im  = a_im - b_im;
    end else begin
      sel_re = head_re;
      sel_im = head_im;
      fb_re  = b_re;
      fb_im  = b_im;
    end
  end

  w8_rot #(.W(W+1)) u_rot (
    .sel  (phase ? 2'd0 : rot),
    .x_re (sel_re),
    .x_im (sel_im),
    .y_re (rot_re),
    .y_im (rot_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(D); i++) begin
        buf_re[i] <= '0;
        buf_im[i] <= '0;
      end
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      buf_re[0] <= fb_re;
      buf_im[0] <= fb_im;
      for (int i = 1; i < int'(D); i++) begin
        buf_re[i] <= buf_re[i-1];
        buf_im[i] <= buf_im[i-1];
      end
      out_re <= rot_re;
      out_im <= rot_im;
    end
  end

endmodule
