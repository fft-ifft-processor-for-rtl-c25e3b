// mrmdf_module1: first stage of the 128-point MRMDF FFT, the radix-2 step
// X = x(n2) +/- x(n2 + 64), with the odd outputs multiplied by W128^n2.
//
// Four samples arrive per enabled cycle; lane p carries x(4t + p) in slot
// t = 0..31 of a frame, so the two operands of a butterfly sit in the same
// lane 16 slots apart.  A 64-word register file (16 words per lane) works as
// a delay-feedback buffer: slots 0..15 park the first half of the frame,
// slots 16..31 run the four BU2s, send the four sums straight on and park
// the four differences, and slots 0..15 of the next frame send those
// differences on.  Only two complex multipliers are used, each busy every
// cycle: multiplier j weights the difference of lane j before it is parked
// and, in the other half frame, the parked difference of lane j + 2 as it is
// read out.  Each multiplier has its own twiddle ROM.  All of this follows
// the document; the ROM layout and word lengths are this design's choices.
//
// Output slot s of a frame (registered, one cycle after the input slot
// s + 16) carries in lane p: for s < 16 the sum for n2 = 4s + p (k1 = 0),
// for s >= 16 the weighted difference for n2 = 4(s-16) + p (k1 = 1).
// Latency 17 enabled cycles; en low freezes the module.
module mrmdf_module1
  import fft_pkg::*;
#(
  parameter int unsigned W = IW + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [4:0]          in_slot,
  input  logic signed [W-1:0] in_re  [LANES],
  input  logic signed [W-1:0] in_im  [LANES],
  output logic [4:0]          out_slot,
  output logic signed [W:0]   out_re [LANES],
  output logic signed [W:0]   out_im [LANES]
);

  localparam int unsigned DEPTH = FRAME / 2;  // 16 words per lane

  logic phase;
  assign phase = in_slot[4];

  // register file: 4 lanes x 16 complex words, shift organised
  logic signed [W:0] rf_re [LANES][DEPTH];
  logic signed [W:0] rf_im [LANES][DEPTH];

  logic signed [W:0] a_re [LANES], a_im [LANES], b_re [LANES], b_im [LANES];
  logic signed [W:0] sum_re [LANES], sum_im [LANES], dif_re [LANES], dif_im [LANES];
  logic signed [W:0] fb_re [LANES], fb_im [LANES], o_re [LANES], o_im [LANES];

  // the two complex multipliers and their ROMs
  logic signed [W:0] m_in_re [2], m_in_im [2], m_out_re [2], m_out_im [2];
  coef_t             tw [2];

  for (genvar p = 0; p < int'(LANES); p++) begin : g_bu
    assign a_re[p]   = rf_re[p][DEPTH-1];
    assign a_im[p]   = rf_im[p][DEPTH-1];
    assign b_re[p]   = (W+1)'(in_re[p]);
    assign b_im[p]   = (W+1)'(in_im[p]);
    assign sum_re[p] = a_re[p] + b_re[p];
    assign sum_im[p] = a_im[p] + b_im[p];
    assign dif_re[p] = a_re[p] - b_re[p];
    assign dif_im[p] = a_im[p] - b_im[p];
  end

  for (genvar j = 0; j < 2; j++) begin : g_mul
    twiddle_rom u_rom (
      .addr ({1'b0, in_slot[3:0], phase ? 2'(j) : 2'(j + 2)}),
      .w    (tw[j])
    );
    assign m_in_re[j] = phase ? dif_re[j] : a_re[j+2];
    assign m_in_im[j] = phase ? dif_im[j] : a_im[j+2];
    cmul #(.W(W+1)) u_cmul (
      .x_re (m_in_re[j]),
      .x_im (m_in_im[j]),
      .w    (tw[j]),
      .y_re (m_out_re[j]),
      .y_im (m_out_im[j])
    );
  end

  always_comb begin
    for (int p = 0; p < int'(LANES); p++) begin
      if (phase) begin
        // butterfly half: sums out, differences parked
        o_re[p]  = sum_re[p];
        o_im[p]  = sum_im[p];
        fb_re[p] = (p < 2) ? m_out_re[p % 2] : dif_re[p];
        fb_im[p] = (p < 2) ? m_out_im[p % 2] : dif_im[p];
      end else begin
        // fill half: inputs parked, parked differences out
        o_re[p]  = (p < 2) ? a_re[p] : m_out_re[p % 2];
        o_im[p]  = (p < 2) ? a_im[p] : m_out_im[p % 2];
        fb_re[p] = b_re[p];
        fb_im[p] = b_im[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(LANES); p++) begin
        for (int i = 0; i < int'(DEPTH); i++) begin
          rf_re[p][i] <= '0;
          rf_im[p][i] <= '0;
        end
        out_re[p] <= '0;
        out_im[p] <= '0;
      end
      out_slot <= '0;
    end else if (en) begin
      for (int p = 0; p < int'(LANES); p++) begin
        rf_re[p][0] <= fb_re[p];
        rf_im[p][0] <= fb_im[p];
        for (int i = 1; i < int'(DEPTH); i++) begin
          rf_re[p][i] <= rf_re[p][i-1];
          rf_im[p][i] <= rf_im[p][i-1];
        end
        out_re[p] <= o_re[p];
        out_im[p] <= o_im[p];
      end
      out_slot <= in_slot - 5'(DEPTH);
    end
  end

endmodule
