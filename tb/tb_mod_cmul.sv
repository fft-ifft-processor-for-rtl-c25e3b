// tb_mod_cmul: random samples and slots through the modified complex
// multiplier; each lane must come out multiplied by W64^(m2*l1) with
// m2 = 4*s[0] + p and l1 = bitrev3(s[3:1]) (double-precision model), one
// enabled beat later, with stall beats in between.  Also requires that the
// duplicate constant multiplier for a = 4 was used.
module tb_mod_cmul;
  import fft_pkg::*;
  localparam int W = 17, NG = 8, DLY = 0;
  localparam real TOL = 1.5;
  // twiddles are quantised to 12 fraction bits: allow a relative error too
  localparam real REL = 3.0e-4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, en = 0;
  logic [4:0] in_slot = '0, out_slot;
  logic signed [W-1:0] in_re [LANES], in_im [LANES];
  logic signed [W-1:0] out_re [LANES], out_im [LANES];
  int checks = 0, failures = 0, beat = 0, stalls = 0;
  // stream of NG 16-slot groups, 4 lanes: sr/si[g][slot][lane]
  int sr [NG][16][4], si [NG][16][4];

  mod_cmul #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  // slots where two lanes need constant 4 and the duplicate multiplier works
  int dup_used = 0;
  always @(negedge clk) if (rst_n && en && dut.cm_busy[8]) dup_used++;

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
    mac(er, ei, sr[g][s][p], si[g][s][p], ((4 * (s & 1) + p) * br3(s >> 1)) % 64, 64);
  endtask

  initial begin
    for (int g = 0; g < NG; g++)
      for (int s = 0; s < 16; s++)
        for (int p = 0; p < 4; p++) begin
          sr[g][s][p] = $signed($urandom_range(65535, 0)) - 32768;
          si[g][s][p] = $signed($urandom_range(65535, 0)) - 32768;
        end
    for (int p = 0; p < 4; p++) begin in_re[p] = '0; in_im[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int gi = 0; gi < 16 * NG; gi++) begin
      if (gi / 16 == 3 && $urandom_range(3, 0) == 0) begin
        en = 0; stalls++;
        @(negedge clk);
      end
      en = 1;
      in_slot = 5'(gi % 32);
      for (int p = 0; p < 4; p++) begin
        in_re[p] = W'(sr[gi/16][gi%16][p]);
        in_im[p] = W'(si[gi/16][gi%16][p]);
      end
      @(negedge clk);
      if (beat - DLY >= 0 && beat - DLY < 16 * (NG - 2)) begin
        int oi;
        oi = beat - DLY;
        chk(out_slot == 5'(oi % 32), $sformatf("slot %0d got %0d", oi % 32, out_slot));
        for (int p = 0; p < 4; p++) begin
          real er, ei;
          expect_val(oi, p, er, ei);
          chk(absr(real'(out_re[p]) - er) <= TOL + REL * (absr(er) + absr(ei)) && absr(real'(out_im[p]) - ei) <= TOL + REL * (absr(er) + absr(ei)),
              $sformatf("idx %0d lane %0d got (%0d,%0d) exp (%f,%f)", oi, p, out_re[p], out_im[p], er, ei));
        end
      end
      beat++;
    end
    chk(stalls > 0, "stall exercised");
    chk(dup_used > 0, $sformatf("duplicate constant multiplier 4 used in %0d slots", dup_used));
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
