// tb_ifft_scale: random 20-bit samples through the divide-by-128 block; with
// div high the result must be floor(x / 128), with div low x itself.
module tb_ifft_scale;
  localparam int W = 20;
  logic div;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  int checks = 0, failures = 0;

  ifft_scale #(.W(W), .SHIFT(7)) dut (.*);

  function automatic int fdiv(input int v);
    return int'($floor(real'(v) / 128.0));
  endfunction

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int r, m;
      r = $signed($urandom_range(1048575, 0)) - 524288;
      m = $signed($urandom_range(1048575, 0)) - 524288;
      div = 1'($urandom_range(1, 0));
      in_re = W'(r); in_im = W'(m);
      #1;
      checks++;
      if (int'(out_re) != (div ? fdiv(r) : r) || int'(out_im) != (div ? fdiv(m) : m)) begin
        failures++;
        if (failures < 10) $display("FAIL: div=%0d in (%0d,%0d) out (%0d,%0d)", div, r, m, out_re, out_im);
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
