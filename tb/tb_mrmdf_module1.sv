// tb_mrmdf_module1: streams four random frames (one with stall beats)
// through the radix-2 first module and checks every output slot against a
// double-precision model: slot s < 16 holds x(n2) + x(n2+64), slot s >= 16
// holds (x(n2) - x(n2+64)) * W128^n2 with n2 = 4*(s mod 16) + p.  Also checks
// out_slot and the 17-beat latency (output stream index = beat - 16).
module tb_mrmdf_module1;
  import fft_pkg::*;
  localparam int W = 13, NF = 4, DLY = 16, TOL = 2;
  logic clk = 0, rst_n = 0, en = 0;
  logic [4:0] in_slot = '0, out_slot;
  logic signed [W-1:0] in_re [LANES], in_im [LANES];
  logic signed [W:0]   out_re [LANES], out_im [LANES];
  int checks = 0, failures = 0, beat = 0, stalls = 0;
  int xr [NF+1][N], xi [NF+1][N];

  mrmdf_module1 #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // expected value of stream index g, lane p
  task automatic expect_val(input int g, input int p, output real er, output real ei);
    int f, s, n2;
    real ar, ai, br, bi, dr, di, c, sn;
    f = g / 32; s = g % 32; n2 = 4 * (s % 16) + p;
    ar = xr[f][n2]; ai = xi[f][n2]; br = xr[f][n2+64]; bi = xi[f][n2+64];
    if (s < 16) begin er = ar + br; ei = ai + bi; end
    else begin
      dr = ar - br; di = ai - bi;
      c  = $cos(2.0 * 3.14159265358979323846 * n2 / 128.0);
      sn = $sin(2.0 * 3.14159265358979323846 * n2 / 128.0);
      er = dr * c + di * sn;
      ei = di * c - dr * sn;
    end
  endtask

  initial begin
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $signed($urandom_range(4095, 0)) - 2048;
        xi[f][n] = $signed($urandom_range(4095, 0)) - 2048;
      end
    for (int p = 0; p < int'(LANES); p++) begin in_re[p] = '0; in_im[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 32 * (NF + 1); g++) begin
      if (g / 32 == 2 && $urandom_range(3, 0) == 0) begin
        en = 0; stalls++;
        @(negedge clk);
      end
      en = 1;
      in_slot = 5'(g % 32);
      for (int p = 0; p < int'(LANES); p++) begin
        in_re[p] = W'(xr[g/32][4*(g%32)+p]);
        in_im[p] = W'(xi[g/32][4*(g%32)+p]);
      end
      @(negedge clk);
      // output registers now hold stream index beat - DLY
      if (beat - DLY >= 0 && beat - DLY < 32 * NF) begin
        int gi;
        gi = beat - DLY;
        chk(out_slot == 5'(gi % 32), $sformatf("slot %0d got %0d", gi % 32, out_slot));
        for (int p = 0; p < int'(LANES); p++) begin
          real er, ei;
          expect_val(gi, p, er, ei);
          chk(absr(real'(out_re[p]) - er) <= TOL && absr(real'(out_im[p]) - ei) <= TOL,
              $sformatf("idx %0d lane %0d got (%0d,%0d) exp (%f,%f)", gi, p, out_re[p], out_im[p], er, ei));
        end
      end
      beat++;
    end
    chk(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
