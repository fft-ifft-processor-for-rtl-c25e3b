// tb_cmul: checks the general complex multiplier against an exact integer
// model of "multiply, add half an LSB, shift right by 12" on random data and
// random twiddles of magnitude at most one, plus the corner cases w = 1,
// w = -j and full-scale data.
module tb_cmul;
  import fft_pkg::*;
  localparam int W = 14;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  coef_t w;
  int checks = 0, failures = 0;

  cmul #(.W(W)) dut (.*);

  task automatic one(input int xr, input int xi, input int wr, input int wi);
    longint er, ei;
    x_re = W'(xr); x_im = W'(xi); w.re = CW'(wr); w.im = CW'(wi);
    #1;
    er = (longint'(xr) * wr - longint'(xi) * wi + 2048) >>> 12;
    ei = (longint'(xr) * wi + longint'(xi) * wr + 2048) >>> 12;
    checks++;
    if (longint'(y_re) != er || longint'(y_im) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL: (%0d,%0d)*(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                                  xr, xi, wr, wi, y_re, y_im, er, ei);
    end
  endtask

  initial begin
    one(5000, -3000, 4096, 0);
    one(5000, -3000, 0, -4096);
    one(-5792, -5792, 2896, -2896);
    for (int i = 0; i < 2000; i++)
      one($signed($urandom_range(11584, 0)) - 5792, $signed($urandom_range(11584, 0)) - 5792,
          $signed($urandom_range(5792, 0)) - 2896, $signed($urandom_range(5792, 0)) - 2896);
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
