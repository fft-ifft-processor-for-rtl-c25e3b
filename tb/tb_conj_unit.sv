// tb_conj_unit: random samples through the conjugate block with the select
// high and low; the imaginary part must be negated only when selected.
module tb_conj_unit;
  localparam int W = 13;
  logic conj;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  int checks = 0, failures = 0;

  conj_unit #(.W(W)) dut (.*);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int r, m;
      r = $signed($urandom_range(8190, 0)) - 4095;
      m = $signed($urandom_range(8190, 0)) - 4095;
      conj = 1'($urandom_range(1, 0));
      in_re = W'(r); in_im = W'(m);
      #1;
      checks++;
      if (int'(out_re) != r || int'(out_im) != (conj ? -m : m)) begin
        failures++;
        if (failures < 10) $display("FAIL: conj=%0d in (%0d,%0d) out (%0d,%0d)", conj, r, m, out_re, out_im);
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
