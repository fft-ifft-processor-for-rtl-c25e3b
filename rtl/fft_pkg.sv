// fft_pkg: constants and helper functions shared by the 128-point four-path
// mixed-radix multipath delay-feedback (MRMDF) FFT/IFFT processor.
//
// The transform size (128), the number of parallel data paths (4) and the
// 2 x 8 x 8 factorisation follow the published architecture.  The word
// lengths are this design's own choice: 12-bit two's-complement inputs, one
// guard bit added at the input, one bit of growth per radix-2 butterfly step
// (7 steps), so results leave the core as 20-bit values that can never
// overflow.  Twiddle factors are signed 14-bit numbers with 12 fraction bits
// (1.0 = 4096).
//
// Only a quarter period of the cosine is stored (COSQ, 33 words); every
// twiddle W128^e = cos(2*pi*e/128) - j*sin(2*pi*e/128) is rebuilt from it by
// quadrant rotation, as the ROMs of the first module do.
package fft_pkg;

  localparam int unsigned N       = 128;  // transform length
  localparam int unsigned LANES   = 4;    // parallel data paths
  localparam int unsigned FRAME   = N / LANES;  // beats per transform (32)
  localparam int unsigned IW      = 12;   // input component width
  localparam int unsigned CW      = 14;   // twiddle component width
  localparam int unsigned CFRAC   = 12;   // twiddle fraction bits
  localparam int unsigned OW      = IW + 1 + 7;  // output component width (20)
  localparam int unsigned LOG2N   = 7;
  // enabled cycles from the first input beat of a frame to its first
  // output beat, counting both: 16 + (8 + 4 + 2) + 1 slots of buffering plus
  // 9 pipeline registers (module 1: 1, module 2: 4, module 3: 3, output: 1)
  localparam int unsigned LATENCY = 40;

  // round(4096*cos(2*pi*e/128)), e = 0..32 (quarter period)
  localparam int COSQ [0:32] = '{
    4096, 4091, 4076, 4052, 4017, 3973, 3920, 3857, 3784, 3703, 3612,
    3513, 3406, 3290, 3166, 3035, 2896, 2751, 2598, 2440, 2276, 2106,
    1931, 1751, 1567, 1380, 1189,  995,  799,  601,  401,  201,    0};

  // 1/sqrt(2) in the twiddle format, used by the W8 rotators
  localparam int INV_SQRT2 = 2896;

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } coef_t;

  // W128^e rebuilt from the quarter-wave table.
  function automatic coef_t w128(input logic [6:0] e);
    coef_t w;
    logic [4:0] r;
    logic [1:0] q;
    logic signed [CW-1:0] t;
    r = e[4:0];
    q = e[6:5];
    w.re = CW'(COSQ[{1'b0, r}]);
    w.im = -CW'(COSQ[6'd32 - {1'b0, r}]);
    // multiply by (-j)^q: (a + jb)(-j) = b - ja
    for (int i = 0; i < 4; i++) begin
      if (i < int'(q)) begin
        t    = w.re;
        w.re = w.im;
        w.im = -t;
      end
    end
    return w;
  endfunction

  // Bit reversal of a 3-bit and of a 7-bit index.
  function automatic logic [2:0] bitrev3(input logic [2:0] v);
    return {v[0], v[1], v[2]};
  endfunction

  function automatic logic [6:0] bitrev7(input logic [6:0] v);
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[i] = v[6-i];
    return r;
  endfunction

endpackage
