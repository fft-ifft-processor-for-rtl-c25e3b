// mrmdf_module3: third stage of the 128-point MRMDF FFT, the second radix-8
// step of the 64-point transforms.
//
// The eight operands of one 8-point DFT (index m2 = 4*b + p) lie in the four
// lanes p and in two consecutive slots b.  Step 1 pairs m2 with m2 + 4, which
// sit in the same lane one slot apart: a delay-feedback BU2 with a one-word
// buffer per lane, the differences weighted by W8^p.  Steps 2 and 3 pair
// lanes (0,2),(1,3) and then (0,1),(2,3): the operands are in different
// paths at the same time, so these BU2s are plain cross-lane butterflies
// (the lane-3 difference of step 2 is weighted by -j).  That the last two
// steps pair different paths follows the document; the wiring is derived
// from the index mapping, as the document gives no figure of it here.
// Output slot s, lane p holds l2 = s[0] + 2*p[1] + 4*p[0] of the DFT for
// l1 = bitrev3(s[3:1]), i.e. final bin k = bitrev7({s, p}).
// Latency 4 enabled cycles; three bits of growth; registered output.
module mrmdf_module3
  import fft_pkg::*;
#(
  parameter int unsigned W = IW + 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [4:0]          in_slot,
  input  logic signed [W-1:0] in_re  [LANES],
  input  logic signed [W-1:0] in_im  [LANES],
  output logic [4:0]          out_slot,
  output logic signed [W+2:0] out_re [LANES],
  output logic signed [W+2:0] out_im [LANES]
);

  logic signed [W:0]   a_re [LANES], a_im [LANES];
  logic signed [W+1:0] b_re [LANES], b_im [LANES];
  logic [4:0]          s1, s2;

  // step 1: same lane, one slot apart
  for (genvar p = 0; p < int'(LANES); p++) begin : g_s1
    sdf_bu2 #(.W(W), .D(1)) u_s1 (
      .clk, .rst_n, .en,
      .phase  (in_slot[0]),
      .rot    (2'(p)),
      .in_re  (in_re[p]),
      .in_im  (in_im[p]),
      .out_re (a_re[p]),
      .out_im (a_im[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(LANES); p++) begin
        b_re[p]   <= '0;
        b_im[p]   <= '0;
        out_re[p] <= '0;
        out_im[p] <= '0;
      end
      s1       <= '0;
      s2       <= '0;
      out_slot <= '0;
    end else if (en) begin
      // step 2: lanes (0,2) and (1,3); the (1,3) difference times -j
      b_re[0] <= (W+2)'(a_re[0]) + (W+2)'(a_re[2]);
      b_im[0] <= (W+2)'(a_im[0]) + (W+2)'(a_im[2]);
      b_re[2] <= (W+2)'(a_re[0]) - (W+2)'(a_re[2]);
      b_im[2] <= (W+2)'(a_im[0]) - (W+2)'(a_im[2]);
      b_re[1] <= (W+2)'(a_re[1]) + (W+2)'(a_re[3]);
      b_im[1] <= (W+2)'(a_im[1]) + (W+2)'(a_im[3]);
      b_re[3] <= (W+2)'(a_im[1]) - (W+2)'(a_im[3]);
      b_im[3] <= (W+2)'(a_re[3]) - (W+2)'(a_re[1]);
      // step 3: lanes (0,1) and (2,3)
      out_re[0] <= (W+3)'(b_re[0]) + (W+3)'(b_re[1]);
      out_im[0] <= (W+3)'(b_im[0]) + (W+3)'(b_im[1]);
      out_re[1] <= (W+3)'(b_re[0]) - (W+3)'(b_re[1]);
      out_im[1] <= (W+3)'(b_im[0]) - (W+3)'(b_im[1]);
      out_re[2] <= (W+3)'(b_re[2]) + (W+3)'(b_re[3]);
      out_im[2] <= (W+3)'(b_im[2]) + (W+3)'(b_im[3]);
      out_re[3] <= (W+3)'(b_re[2]) - (W+3)'(b_re[3]);
      out_im[3] <= (W+3)'(b_im[2]) - (W+3)'(b_im[3]);
      s1       <= in_slot - 5'd1;
      s2       <= s1;
      out_slot <= s2;
    end
  end

endmodule
