// mrmdf_fft128: 128-point FFT/IFFT processor with four parallel data paths
// (mixed-radix multipath delay feedback, MRMDF), aimed at OFDM ultra wide
// band receivers and transmitters.
//
// The transform is split as 128 = 2 x 8 x 8: module 1 does the radix-2 step
// with a 64-word delay-feedback register file and two time-shared complex
// multipliers, module 2 the first radix-8 step with four delay-feedback BU8s
// and one modified (constant) complex multiplier, module 3 the second radix-8
// step whose last two BU2 steps pair different paths.  An IFFT reuses the
// same forward datapath: the input is conjugated, the result conjugated
// again and divided by 128 with a 7-bit arithmetic shift.
//
// Interface: every beat with in_valid high delivers four samples, lane p
// carrying x(4*t + p) in slot t = 0..31 of a frame; frames follow each other
// with no gap needed.  A beat with in_valid low stalls the whole processor.
// ifft is sampled at the first beat of each frame.  Outputs come LATENCY
// (40) input beats after a frame's first input beat, four per beat, in
// bit-reversed order: lane p of output slot s is bin k = bitrev7(4*s + p),
// given on out_k.  Throughput is four samples per clock (the published chip
// reaches 1 Gsample/s at 250 MHz).  FFT results are the unscaled sums, 20
// bits; IFFT results are divided by 128 in the same 20-bit field.
// Structure and order follow the document; word lengths, the stall rule and
// the per-frame mode latch are this design's choices.
module mrmdf_fft128
  import fft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 ifft,
  input  logic signed [IW-1:0] in_re  [LANES],
  input  logic signed [IW-1:0] in_im  [LANES],
  output logic                 out_valid,
  output logic                 out_ifft,
  output logic [4:0]           out_slot,
  output logic [6:0]           out_k  [LANES],
  output logic signed [OW-1:0] out_re [LANES],
  output logic signed [OW-1:0] out_im [LANES]
);

  localparam int unsigned W1 = IW + 1;   // after the guard bit
  localparam int unsigned W2 = W1 + 1;   // after module 1
  localparam int unsigned W3 = W2 + 3;   // after module 2

  logic       en, in_conj, mode_out;
  logic [4:0] slot0, slot1, slot2, slot3;

  logic signed [W1-1:0] g_re [LANES], g_im [LANES], c_re [LANES], c_im [LANES];
  logic signed [W2-1:0] m1_re [LANES], m1_im [LANES];
  logic signed [W3-1:0] m2_re [LANES], m2_im [LANES];
  logic signed [OW-1:0] m3_re [LANES], m3_im [LANES];
  logic signed [OW-1:0] oc_re [LANES], oc_im [LANES], os_re [LANES], os_im [LANES];

  fft_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .ifft,
    .core_slot (slot3),
    .en,
    .in_slot   (slot0),
    .in_conj,
    .out_ifft  (mode_out),
    .out_valid
  );

  for (genvar p = 0; p < int'(LANES); p++) begin : g_in
    assign g_re[p] = W1'(in_re[p]);
    assign g_im[p] = W1'(in_im[p]);
    conj_unit #(.W(W1)) u_conj_in (
      .conj   (in_conj),
      .in_re  (g_re[p]), .in_im (g_im[p]),
      .out_re (c_re[p]), .out_im (c_im[p])
    );
  end

  mrmdf_module1 #(.W(W1)) u_m1 (
    .clk, .rst_n, .en,
    .in_slot  (slot0),
    .in_re    (c_re), .in_im (c_im),
    .out_slot (slot1),
    .out_re   (m1_re), .out_im (m1_im)
  );

  mrmdf_module2 #(.W(W2)) u_m2 (
    .clk, .rst_n, .en,
    .in_slot  (slot1),
    .in_re    (m1_re), .in_im (m1_im),
    .out_slot (slot2),
    .out_re   (m2_re), .out_im (m2_im)
  );

  mrmdf_module3 #(.W(W3)) u_m3 (
    .clk, .rst_n, .en,
    .in_slot  (slot2),
    .in_re    (m2_re), .in_im (m2_im),
    .out_slot (slot3),
    .out_re   (m3_re), .out_im (m3_im)
  );

  for (genvar p = 0; p < int'(LANES); p++) begin : g_out
    conj_unit #(.W(OW)) u_conj_out (
      .conj   (mode_out),
      .in_re  (m3_re[p]), .in_im (m3_im[p]),
      .out_re (oc_re[p]), .out_im (oc_im[p])
    );
    ifft_scale #(.W(OW), .SHIFT(LOG2N)) u_div (
      .div    (mode_out),
      .in_re  (oc_re[p]), .in_im (oc_im[p]),
      .out_re (os_re[p]), .out_im (os_im[p])
    );
    assign out_k[p] = bitrev7({out_slot, 2'(p)});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(LANES); p++) begin
        out_re[p] <= '0;
        out_im[p] <= '0;
      end
      out_slot <= '0;
      out_ifft <= 1'b0;
    end else if (en) begin
      for (int p = 0; p < int'(LANES); p++) begin
        out_re[p] <= os_re[p];
        out_im[p] <= os_im[p];
      end
      out_slot <= slot3;
      out_ifft <= mode_out;
    end
  end

endmodule
