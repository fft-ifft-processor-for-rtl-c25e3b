// bu8: radix-8 butterfly of the second module, one per data path.
//
// An 8-point DFT computed in three radix-2 steps, each a delay-feedback BU2
// (sdf_bu2) with buffers of 8, 4 and 2 words.  In a lane the eight operands
// of one 8-point DFT are two slots apart (slot = 2*m1 + b, b selects one of
// two interleaved DFTs), so the steps pair slots 8, 4 and 2 apart.  After
// the first step the differences are multiplied by W8^m (m = 0..3), after
// the second by W4^m = W8^(2m); both are the cheap trivial twiddles (w8_rot).
// The three buffer sizes and the trivial twiddles between the steps follow
// the document; the step order (plain decimation in frequency) is this
// design's choice.
// Output slot s (4 LSBs q2 q1 q0 b) carries DFT output l1 = q0 q1 q2 (bit
// reversed) of interleave b.  Latency 17 enabled cycles, out_slot tracks the
// slot of the registered output.  Output is three bits wider than the input.
module bu8
  import fft_pkg::*;
#(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [4:0]          in_slot,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic [4:0]          out_slot,
  output logic signed [W+2:0] out_re,
  output logic signed [W+2:0] out_im
);

  logic [4:0]        s1, s2;
  logic signed [W:0]   r1, i1;
  logic signed [W+1:0] r2, i2;

  sdf_bu2 #(.W(W), .D(8)) u_s1 (
    .clk, .rst_n, .en,
    .phase (in_slot[3]),
    .rot   (in_slot[2:1]),
    .in_re, .in_im,
    .out_re (r1), .out_im (i1)
  );

  sdf_bu2 #(.W(W+1), .D(4)) u_s2 (
    .clk, .rst_n, .en,
    .phase (s1[2]),
    .rot   ({s1[1], 1'b0}),
    .in_re (r1), .in_im (i1),
    .out_re (r2), .out_im (i2)
  );

  sdf_bu2 #(.W(W+2), .D(2)) u_s3 (
    .clk, .rst_n, .en,
    .phase (s2[1]),
    .rot   (2'd0),
    .in_re (r2), .in_im (i2),
    .out_re, .out_im
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1       <= '0;
      s2       <= '0;
      out_slot <= '0;
    end else if (en) begin
      s1       <= in_slot - 5'd8;
      s2       <= s1 - 5'd4;
      out_slot <= s2 - 5'd2;
    end
  end

endmodule
