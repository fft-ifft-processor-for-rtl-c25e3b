// tb_bu8: streams random data through one radix-8 delay-feedback
// butterfly (stall beats in one group) and checks each output against a
// double-precision 8-point DFT: in each 16-slot group, slot 2*m1 + b holds
// operand m1 of DFT b, output slot s holds bin bitrev3(s[3:1]) of DFT s[0].
// Also checks out_slot and the 17-beat latency (output index = beat - 16).
module tb_bu8;
  import fft_pkg::*;
  localparam int W = 14, NG = 8, DLY = 16;
  localparam real TOL = 2.0;
  // twiddles are quantised to 12 fraction bits: allow a relative error too
  localparam real REL = 3.0e-4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, en = 0;
  logic [4:0] in_slot = '0, out_slot;
  logic signed [W-1:0] in_re, in_im;
  logic signed [W+2:0] out_re, out_im;
  int checks = 0, failures = 0, beat = 0, stalls = 0;
  // stream of NG 16-slot groups, 4 lanes: sr/si[g][slot][lane]
  int sr [NG][16][4], si [NG][16][4];

  bu8 #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int br3(input int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // complex multiply-accumulate helper: acc += (xr + j xi) * e^{-j 2 pi num / den}
  task automatic mac(inout real ar, inout real ai, input real xr, input real xi,
                     input int num, input int den);
    real c, s;
    c = $cos(2.0 * PI * num / den);
    s = $sin(2.0 * PI * num / den);
    ar += xr * c + xi * s;
    ai += xi * c - xr * s;
  endtask

  // expected output of stream index gi (group gi/16, slot gi%16), lane p
  task automatic expect_val(input int gi, input int p, output real er, output real ei);
    int g, s;
    g = gi / 16; s = gi % 16;
    er = 0.0; ei = 0.0;
    for (int m1 = 0; m1 < 8; m1++)
      mac(er, ei, sr[g][2*m1 + (s & 1)][0], si[g][2*m1 + (s & 1)][0], m1 * br3(s >> 1), 8);
  endtask

  initial begin
    for (int g = 0; g < NG; g++)
      for (int s = 0; s < 16; s++)
        for (int p = 0; p < 4; p++) begin
          sr[g][s][p] = $signed($urandom_range(8191, 0)) - 4096;
          si[g][s][p] = $signed($urandom_range(8191, 0)) - 4096;
        end
    in_re = '0; in_im = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int gi = 0; gi < 16 * NG; gi++) begin
      if (gi / 16 == 3 && $urandom_range(3, 0) == 0) begin
        en = 0; stalls++;
        @(negedge clk);
      end
      en = 1;
      in_slot = 5'(gi % 32);
      in_re = W'(sr[gi/16][gi%16][0]);
      in_im = W'(si[gi/16][gi%16][0]);
      @(negedge clk);
      if (beat - DLY >= 0 && beat - DLY < 16 * (NG - 2)) begin
        int oi;
        oi = beat - DLY;
        chk(out_slot == 5'(oi % 32), $sformatf("slot %0d got %0d", oi % 32, out_slot));
        for (int p = 0; p < 1; p++) begin
          real er, ei;
          expect_val(oi, p, er, ei);
          chk(absr(real'(out_re) - er) <= TOL + REL * (absr(er) + absr(ei)) && absr(real'(out_im) - ei) <= TOL + REL * (absr(er) + absr(ei)),
              $sformatf("idx %0d lane %0d got (%0d,%0d) exp (%f,%f)", oi, p, out_re, out_im, er, ei));
        end
      end
      beat++;
    end
    chk(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
