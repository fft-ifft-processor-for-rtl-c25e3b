// tb_mrmdf_fft128: end-to-end test of the 128-point MRMDF FFT/IFFT processor.
//
// Streams NF frames of random 12-bit complex samples, four per beat, mixing
// FFT and IFFT frames, back to back and with random stall beats, then
// flushes with zero frames.  Every output bin is compared with a
// double-precision DFT (or inverse DFT scaled by 1/128) computed here.
// Also checks the output order (slots 0..31 in sequence, out_k bit
// reversed), the 40-beat latency, the four-samples-per-beat throughput of an
// unstalled frame, and that stalls, mode switches, IFFT and FFT frames all
// occurred.
module tb_mrmdf_fft128;
  import fft_pkg::*;

  localparam int NF       = 6;
  localparam int NFLUSH   = 2;
  localparam int TOL_FFT  = 16;   // LSBs of the 20-bit unscaled result (12-bit twiddles)
  localparam int TOL_IFFT = 2;
  localparam int WATCHDOG = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, ifft = 1'b0;
  logic signed [IW-1:0] in_re [LANES], in_im [LANES];
  logic out_valid, out_ifft;
  logic [4:0] out_slot;
  logic [6:0] out_k [LANES];
  logic signed [OW-1:0] out_re [LANES], out_im [LANES];

  mrmdf_fft128 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NF][N], xi [NF][N];
  bit mode [NF];
  real rr [NF][N], ri [NF][N];
  int n_stall = 0, n_switch = 0, n_ifft = 0, n_fft = 0, n_b2b = 0;
  int beats = 0, first_out_beat = -1;
  int of = 0, os = 0;        // expected output frame and slot
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish();
    $display("max abs error: fft %f ifft %f LSB", maxerr[0], maxerr[1]);
    $display("mechanisms: stalls=%0d mode_switches=%0d ifft_frames=%0d fft_frames=%0d back_to_back=%0d",
             n_stall, n_switch, n_ifft, n_fft, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // reference transforms
  initial begin
    for (int f = 0; f < NF; f++) begin
      mode[f] = (f == 1 || f == 2 || f == 4);
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $signed($urandom_range(4095, 0)) - 2048;
        xi[f][n] = $signed($urandom_range(4095, 0)) - 2048;
      end
      // one full-scale frame exercises the guard bit
      if (f == 3) for (int n = 0; n < N; n++) begin xr[f][n] = 2047; xi[f][n] = -2048; end
      for (int k = 0; k < N; k++) begin
        real sr, si, ang;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < N; n++) begin
          ang = 2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
          if (mode[f]) ang = -ang;
          sr += xr[f][n] * $cos(ang) + xi[f][n] * $sin(ang);
          si += xi[f][n] * $cos(ang) - xr[f][n] * $sin(ang);
        end
        if (mode[f]) begin sr /= 128.0; si /= 128.0; end
        rr[f][k] = sr;
        ri[f][k] = si;
      end
    end
  end

  // driver
  initial begin
    for (int p = 0; p < int'(LANES); p++) begin in_re[p] = '0; in_im[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF + NFLUSH; f++) begin
      if (f > 0 && f < NF && mode[f] != mode[f-1]) n_switch++;
      if (f < NF) begin if (mode[f]) n_ifft++; else n_fft++; end
      for (int t = 0; t < int'(FRAME); t++) begin
        // stalls only in frames 3 and 5, so others run back to back
        if ((f == 3 || f == 5) && ($urandom_range(3, 0) == 0)) begin
          in_valid = 1'b0;
          n_stall++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        ifft     = (f < NF) ? mode[f] : 1'b0;
        for (int p = 0; p < int'(LANES); p++) begin
          in_re[p] = (f < NF) ? IW'(xr[f][4*t+p]) : '0;
          in_im[p] = (f < NF) ? IW'(xi[f][4*t+p]) : '0;
        end
        @(negedge clk);
        beats++;
      end
      if (f == 1 || f == 2) n_b2b++;
    end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(of == NF, $sformatf("received %0d of %0d frames", of, NF));
    check(first_out_beat == int'(LATENCY), $sformatf("latency %0d beats, expected %0d",
                                                   first_out_beat, LATENCY));
    check(n_stall > 0 && n_switch > 0 && n_ifft > 0 && n_fft > 0 && n_b2b > 0,
          "every mechanism exercised");
    finish();
  end

  // throughput: frame 0 leaves while frames 1 and 2 enter unstalled, so its
  // 32 output beats must be on consecutive clocks
  int f1_first = -1, f1_last = -1;
  real maxerr [2] = '{0.0, 0.0};

  // monitor
  always @(negedge clk) begin
    cyc++;
    if (rst_n && out_valid && of < NF) begin
      if (first_out_beat < 0) first_out_beat = beats;
      if (of == 0 && os == 0) f1_first = cyc;
      if (of == 0 && os == 31) begin
        f1_last = cyc;
        check(f1_last - f1_first == 31, "unstalled frame leaves in 32 consecutive clocks");
      end
      check(out_slot == 5'(os), $sformatf("frame %0d slot %0d got %0d", of, os, out_slot));
      check(out_ifft == mode[of], $sformatf("frame %0d mode", of));
      for (int p = 0; p < int'(LANES); p++) begin
        int k;
        real er, ei, tol;
        k  = int'(bitrev7(7'(4 * os + p)));
        check(out_k[p] == 7'(k), $sformatf("out_k lane %0d slot %0d", p, os));
        er = real'(out_re[p]) - rr[of][k];
        ei = real'(out_im[p]) - ri[of][k];
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        tol = mode[of] ? TOL_IFFT : TOL_FFT;
        if (er > maxerr[mode[of]]) maxerr[mode[of]] = er;
        if (ei > maxerr[mode[of]]) maxerr[mode[of]] = ei;
        check(er <= tol && ei <= tol,
              $sformatf("frame %0d (%s) bin %0d: got (%0d,%0d) expected (%f,%f)", of,
                        mode[of] ? "ifft" : "fft", k, out_re[p], out_im[p], rr[of][k], ri[of][k]));
      end
      os++;
      if (os == int'(FRAME)) begin os = 0; of++; end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish();
  end

endmodule
