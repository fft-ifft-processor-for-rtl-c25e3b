// mrmdf_chip: the FFT/IFFT test chip, the 128-point MRMDF processor core
// behind its input test module.
//
// Samples are loaded serially through ser_valid/ser_re/ser_im (128 per
// frame, natural order).  With run high the test module feeds the stored
// frame to the core four samples per clock, back to back; run low stalls
// both.  ifft selects the transform for each frame the core starts (sampled
// at the frame's first beat).  Results leave on the core's four parallel
// output lanes in bit-reversed order with out_k naming each bin, 40 beats
// after the frame's first beat; see mrmdf_fft128 for the formats.
// The arrangement of a serial-load test module in front of the four-path
// core follows the document; the control pins are this design's choice.
module mrmdf_chip
  import fft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 ser_valid,
  input  logic signed [IW-1:0] ser_re,
  input  logic signed [IW-1:0] ser_im,
  input  logic                 run,
  input  logic                 ifft,
  output logic                 loaded,
  output logic                 out_valid,
  output logic                 out_ifft,
  output logic [4:0]           out_slot,
  output logic [6:0]           out_k  [LANES],
  output logic signed [OW-1:0] out_re [LANES],
  output logic signed [OW-1:0] out_im [LANES]
);

  logic                 core_valid;
  logic signed [IW-1:0] core_re [LANES], core_im [LANES];

  test_module u_test (
    .clk, .rst_n, .clear, .ser_valid, .ser_re, .ser_im, .run,
    .loaded,
    .out_valid (core_valid),
    .out_re    (core_re),
    .out_im    (core_im)
  );

  mrmdf_fft128 u_core (
    .clk, .rst_n,
    .in_valid (core_valid),
    .ifft,
    .in_re    (core_re),
    .in_im    (core_im),
    .out_valid, .out_ifft, .out_slot, .out_k, .out_re, .out_im
  );

endmodule
