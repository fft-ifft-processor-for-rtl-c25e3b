// tb_w8_rot: random samples through the trivial-twiddle rotator for all four
// selections; the result must equal x * W8^sel computed in double precision
// to within one LSB plus the error of the 12-bit 1/sqrt(2) constant.
module tb_w8_rot;
  localparam int W = 16;
  localparam real PI = 3.14159265358979323846;
  logic [1:0] sel;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;

  w8_rot #(.W(W)) dut (.*);

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int r, m;
      real c, s, er, ei;
      r = $signed($urandom_range(46340, 0)) - 23170;
      m = $signed($urandom_range(46340, 0)) - 23170;
      sel = 2'($urandom_range(3, 0));
      x_re = W'(r); x_im = W'(m);
      #1;
      c  = $cos(2.0 * PI * sel / 8.0);
      s  = $sin(2.0 * PI * sel / 8.0);
      er = r * c + m * s;
      ei = m * c - r * s;
      checks++;
      // 1/sqrt(2) is 2896/4096, 7.5e-5 low: allow that relative error
      if (absr(real'(y_re) - er) > 1.0 + 8.0e-5 * (absr(r) + absr(m)) ||
          absr(real'(y_im) - ei) > 1.0 + 8.0e-5 * (absr(r) + absr(m))) begin
        failures++;
        if (failures < 10) $display("FAIL: sel=%0d x=(%0d,%0d) got (%0d,%0d) exp (%f,%f)",
                                    sel, r, m, y_re, y_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
