// tb_twiddle_rom: reads all 128 addresses of the quarter-wave twiddle ROM and
// compares each with round(4096*cos(2*pi*e/128)) and -round(4096*sin(...))
// computed in double precision.
module tb_twiddle_rom;
  import fft_pkg::*;
  logic [6:0] addr;
  coef_t w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.*);

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    for (int e = 0; e < 128; e++) begin
      int er, ei;
      addr = 7'(e);
      #1;
      er = rnd(4096.0 * $cos(2.0 * 3.14159265358979323846 * e / 128.0));
      ei = -rnd(4096.0 * $sin(2.0 * 3.14159265358979323846 * e / 128.0));
      checks++;
      if (int'(w.re) != er || int'(w.im) != ei) begin
        failures++;
        $display("FAIL: e=%0d got (%0d,%0d) exp (%0d,%0d)", e, w.re, w.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
