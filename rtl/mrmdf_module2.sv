// mrmdf_module2: second stage of the 128-point MRMDF FFT, the first radix-8
// step of the 64-point transforms.
//
// Four identical radix-8 butterflies (bu8, one per data path, delay-feedback
// buffers of 8, 4 and 2 words) followed by the modified complex multiplier
// (mod_cmul) that applies W64^(m2*l1) to the four paths together.  Input is
// the output stream of module 1: in slot s, lane p carries sample
// n2 = 4*(s mod 16) + p of the 64-point transform k1 = s div 16.  Output in
// slot s, lane p: 8-point DFT output l1 = bitrev3(s[3:1]) for
// m2 = 4*s[0] + p, already weighted by W64^(m2*l1).  The structure follows
// the document.  Latency 18 enabled cycles; three bits of growth.
module mrmdf_module2
  import fft_pkg::*;
#(
  parameter int unsigned W = IW + 2
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

  logic signed [W+2:0] b_re [LANES], b_im [LANES];
  logic [4:0]          b_slot [LANES];

  for (genvar p = 0; p < int'(LANES); p++) begin : g_bu8
    bu8 #(.W(W)) u_bu8 (
      .clk, .rst_n, .en, .in_slot,
      .in_re    (in_re[p]),
      .in_im    (in_im[p]),
      .out_slot (b_slot[p]),
      .out_re   (b_re[p]),
      .out_im   (b_im[p])
    );
  end

  mod_cmul #(.W(W+3)) u_mcm (
    .clk, .rst_n, .en,
    .in_slot (b_slot[0]),
    .in_re   (b_re),
    .in_im   (b_im),
    .out_slot,
    .out_re,
    .out_im
  );

endmodule
