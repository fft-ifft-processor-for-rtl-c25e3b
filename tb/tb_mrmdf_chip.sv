// tb_mrmdf_chip: end-to-end test of the test chip at its default sizes.
//
// Loads a random frame A serially (with idle clocks between samples), runs
// it through the core for several back-to-back frames while the FFT/IFFT
// pin changes mid-frame, stops, clears, loads frame B and runs again.  Every
// output frame is compared bin by bin with a double-precision DFT (or 1/128
// inverse DFT) of the frame that produced it, and must keep one mode for all
// 32 beats.  Counts and requires: serial loads, back-to-back frames, core
// stalls with frames in flight, FFT and IFFT frames and mode switches.  Also
// checks the 40-beat latency from the first play-out beat and the bit-
// reversed output order.
module tb_mrmdf_chip;
  import fft_pkg::*;

  localparam int TOL_FFT  = 16;   // LSBs of the 20-bit unscaled result (12-bit twiddles)
  localparam int TOL_IFFT = 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, clear = 0, ser_valid = 0, run = 0, ifft = 0;
  logic signed [IW-1:0] ser_re = '0, ser_im = '0;
  logic loaded, out_valid, out_ifft;
  logic [4:0] out_slot;
  logic [6:0] out_k [LANES];
  logic signed [OW-1:0] out_re [LANES], out_im [LANES];

  mrmdf_chip dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [2][N], xi [2][N];
  real rr [2][2][N], ri [2][2][N];     // [frame data][mode][bin]
  int frame_src [32];                  // which data each input frame carries
  int nin = 0, nout = 0, os = 0;
  int n_load = 0, n_b2b = 0, n_stall = 0, n_fft = 0, n_ifft = 0, n_switch = 0;
  bit cur_mode, last_mode;
  int cyc = 0, first_play = -1, first_out = -1;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic load(input int d);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int n = 0; n < int'(N); n++) begin
      while ($urandom_range(2, 0) == 0) @(negedge clk);
      ser_valid = 1; ser_re = IW'(xr[d][n]); ser_im = IW'(xi[d][n]);
      @(negedge clk);
      ser_valid = 0;
    end
    @(negedge clk);
    chk(loaded, "buffer loaded after 128 samples");
    n_load++;
  endtask

  // run for nf frames of data d
  task automatic play(input int d, input int nf);
    run = 1;
    for (int i = 0; i < nf; i++) frame_src[nin + i] = d;
    nin += nf;
    repeat (32 * nf) @(negedge clk);
    run = 0;
    n_b2b += nf - 1;
    repeat (40) @(negedge clk);
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      for (int n = 0; n < int'(N); n++) begin
        xr[d][n] = $signed($urandom_range(4095, 0)) - 2048;
        xi[d][n] = $signed($urandom_range(4095, 0)) - 2048;
      end
      for (int m = 0; m < 2; m++)
        for (int k = 0; k < int'(N); k++) begin
          real sr, si, ang;
          sr = 0.0; si = 0.0;
          for (int n = 0; n < int'(N); n++) begin
            ang = 2.0 * PI * real'((n * k) % N) / real'(N);
            if (m == 1) ang = -ang;
            sr += xr[d][n] * $cos(ang) + xi[d][n] * $sin(ang);
            si += xi[d][n] * $cos(ang) - xr[d][n] * $sin(ang);
          end
          if (m == 1) begin sr /= 128.0; si /= 128.0; end
          rr[d][m][k] = sr; ri[d][m][k] = si;
        end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(0);
    play(0, 4);
    load(1);
    play(1, 4);
    // the last frame of B is still inside the core: push one more B frame
    play(1, 2);
    chk(nout >= nin - 2, $sformatf("%0d frames out of %0d in", nout, nin));
    chk(first_out - first_play == int'(LATENCY),
        $sformatf("latency %0d clocks, expected %0d", first_out - first_play, LATENCY));
    $display("mechanisms: loads=%0d back_to_back=%0d stalls=%0d fft=%0d ifft=%0d switches=%0d",
             n_load, n_b2b, n_stall, n_fft, n_ifft, n_switch);
    chk(n_load >= 2, "serial load");
    chk(n_b2b > 0, "back-to-back frames");
    chk(n_stall > 0, "core stalled with frames in flight");
    chk(n_fft > 0 && n_ifft > 0, "both modes");
    chk(n_switch > 0, "mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode pin: changes every 45 clocks, so it changes mid-frame
  always @(negedge clk) begin
    cyc++;
    if (cyc % 45 == 0) ifft = ~ifft;
    if (first_play < 0 && dut.core_valid) first_play = cyc;
    if (!dut.core_valid && nin > 0 && nout < nin && first_out >= 0) n_stall++;
  end

  // output checker
  always @(negedge clk) begin
    if (out_valid) begin
      int d;
      if (first_out < 0) first_out = cyc;
      d = frame_src[nout];
      if (os == 0) begin
        cur_mode = out_ifft;
        if (nout > 0 && cur_mode != last_mode) n_switch++;
        if (cur_mode) n_ifft++; else n_fft++;
      end
      chk(out_ifft == cur_mode, "mode constant within a frame");
      chk(out_slot == 5'(os), "output slot order");
      for (int p = 0; p < int'(LANES); p++) begin
        int k;
        real tol;
        k = int'(bitrev7(7'(4 * os + p)));
        chk(out_k[p] == 7'(k), "out_k is bit reversed");
        tol = cur_mode ? TOL_IFFT : TOL_FFT;
        chk(absr(real'(out_re[p]) - rr[d][cur_mode][k]) <= tol &&
            absr(real'(out_im[p]) - ri[d][cur_mode][k]) <= tol,
            $sformatf("frame %0d bin %0d mode %0d got (%0d,%0d) exp (%f,%f)", nout, k, cur_mode,
                      out_re[p], out_im[p], rr[d][cur_mode][k], ri[d][cur_mode][k]));
      end
      os++;
      if (os == 32) begin os = 0; nout++; last_mode = cur_mode; end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
