// tb_test_module: loads 128 random samples serially with idle clocks in
// between, checks that loaded rises only after the 128th, then plays the
// buffer out and checks that every beat carries words 4t..4t+3 in order,
// frame after frame with no gap, that taking run low stops play-out only at
// a frame boundary, and that clear followed by a new load replaces the data.
module tb_test_module;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, ser_valid = 0, run = 0;
  logic signed [IW-1:0] ser_re = '0, ser_im = '0;
  logic loaded, out_valid;
  logic signed [IW-1:0] out_re [LANES], out_im [LANES];
  int checks = 0, failures = 0;
  int xr [N], xi [N];
  int t = 0, beats = 0;

  test_module dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  task automatic load();
    clear = 1; @(negedge clk); clear = 0;
    for (int n = 0; n < int'(N); n++) begin
      xr[n] = $signed($urandom_range(4095, 0)) - 2048;
      xi[n] = $signed($urandom_range(4095, 0)) - 2048;
      if ($urandom_range(1, 0) == 0) @(negedge clk);
      chk(!loaded, "not loaded before the last sample");
      ser_valid = 1; ser_re = IW'(xr[n]); ser_im = IW'(xi[n]);
      @(negedge clk);
      ser_valid = 0;
    end
    chk(loaded, "loaded after 128 samples");
  endtask

  always @(negedge clk) begin
    if (out_valid) begin
      for (int p = 0; p < int'(LANES); p++)
        chk(int'(out_re[p]) == xr[4*t+p] && int'(out_im[p]) == xi[4*t+p],
            $sformatf("beat %0d lane %0d", t, p));
      t = (t + 1) % 32;
      beats++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    load();
    run = 1;
    repeat (100) @(negedge clk);   // 3 frames and 2 clocks after READY
    run = 0;
    repeat (40) @(negedge clk);
    chk(t == 0, "play-out stops at a frame boundary");
    chk(beats % 32 == 0 && beats >= 96, $sformatf("whole frames played back to back (%0d beats)", beats));
    load();
    run = 1;
    repeat (40) @(negedge clk);
    run = 0;
    repeat (40) @(negedge clk);
    chk(t == 0 && beats >= 128, "second load played");
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
