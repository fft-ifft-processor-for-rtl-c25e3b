// tb_fft_ctrl: drives the control unit with random valid/stall beats and a
// random FFT/IFFT select, and checks against a cycle model: en follows
// in_valid, in_slot counts enabled beats modulo 32, in_conj is the select
// sampled at slot 0 of each frame, out_valid rises one clock after the
// LATENCY-th enabled beat and only after enabled beats, and out_ifft gives
// each leaving frame the mode it entered with.  core_slot is fed as the core
// would produce it.
module tb_fft_ctrl;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, ifft = 0;
  logic [4:0] core_slot;
  logic en, in_conj, out_ifft, out_valid;
  logic [4:0] in_slot;
  int checks = 0, failures = 0;
  int beats = 0, stalls = 0, switches = 0;
  bit fmode [64];

  fft_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  assign core_slot = (beats >= int'(LATENCY) - 1) ? 5'((beats - int'(LATENCY) + 1) % 32) : 5'd0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      in_valid = ($urandom_range(4, 0) != 0);
      ifft     = 1'($urandom_range(1, 0));
      #1;
      chk(en == in_valid, "en follows in_valid");
      chk(in_slot == 5'(beats % 32), $sformatf("in_slot %0d expected %0d", in_slot, beats % 32));
      if (in_valid && beats % 32 == 0) begin
        fmode[(beats / 32) % 64] = ifft;
        if (beats > 0 && fmode[(beats / 32 - 1) % 64] != ifft) switches++;
      end
      if (in_valid) chk(in_conj == fmode[(beats / 32) % 64], "in_conj is the frame mode");
      if (in_valid && beats >= int'(LATENCY) - 1)
        chk(out_ifft == fmode[((beats - int'(LATENCY) + 1) / 32) % 64],
            $sformatf("out_ifft of leaving frame at beat %0d", beats));
      if (!in_valid) stalls++;
      @(negedge clk);
      chk(out_valid == (in_valid && beats >= int'(LATENCY) - 1), $sformatf("out_valid at beat %0d", beats));
      if (in_valid) beats++;
    end
    chk(stalls > 0 && switches > 0, "stalls and mode switches exercised");
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
