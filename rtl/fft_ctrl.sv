// fft_ctrl: control unit of the MRMDF FFT/IFFT processor.
//
// The datapath is a set of delay-feedback pipelines that all advance
// together.  The control unit turns in_valid into the common advance enable
// (a beat with in_valid low is a stall that freezes every register), counts
// the input slot 0..31 of the current 128-point frame, and latches the
// FFT/IFFT select at the first slot of each frame, so a frame is always
// transformed in one mode.  The selected mode of every frame is queued
// (MODES deep) and read back when that frame leaves the core, to drive the
// output conjugate and divide blocks.  out_valid marks output beats once the
// pipeline has filled (LATENCY beats after the first input).
// The document names the control unit and the FFT/IFFT control signal only;
// the stall rule, the per-frame mode latch and the mode queue are this
// design's choices.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int unsigned MODES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       ifft,          // 1 = inverse transform, sampled at slot 0
  input  logic [4:0] core_slot,     // slot of the core result being output
  output logic       en,
  output logic [4:0] in_slot,
  output logic       in_conj,       // conjugate the current input beat
  output logic       out_ifft,      // mode of the beat being output
  output logic       out_valid      // registered: output registers hold a new beat
);

  localparam int unsigned PW = $clog2(MODES);

  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          mode_q [MODES];
  logic          mode_cur;
  logic [$clog2(LATENCY+1)-1:0] filled;
  logic          primed;

  assign en      = in_valid;
  assign in_conj = (in_slot == '0) ? ifft : mode_cur;
  assign primed  = (filled >= ($clog2(LATENCY+1))'(LATENCY - 1));
  assign out_ifft = mode_q[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_slot   <= '0;
      mode_cur  <= 1'b0;
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      filled    <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < int'(MODES); i++) mode_q[i] <= 1'b0;
    end else begin
      out_valid <= en && primed;
      if (en) begin
        in_slot <= in_slot + 5'd1;
        if (!primed) filled <= filled + 1'b1;
        if (in_slot == '0) begin
          mode_cur       <= ifft;
          mode_q[wr_ptr] <= ifft;
          wr_ptr         <= wr_ptr + 1'b1;
        end
        if (primed && core_slot == 5'(FRAME - 1)) rd_ptr <= rd_ptr + 1'b1;
      end
    end
  end

endmodule
