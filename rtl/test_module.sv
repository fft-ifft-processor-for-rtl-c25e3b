// test_module: input buffer of the test chip.  It turns a serial stream of
// complex samples from the chip pins into the four-samples-per-clock stream
// the FFT/IFFT core needs.
//
// While run is low, each clock with ser_valid high writes one complex sample
// into the next of N = 128 buffer words (address 0 first); after the 128th
// sample the buffer is marked loaded and further writes are ignored until
// clear.  While run is high and the buffer is loaded, the stored frame is
// played out four words per clock, lane p of beat t carrying word 4t + p,
// over and over, so the core sees back-to-back frames at full rate.  Taking
// run low stops play-out at the end of the current frame (the core then
// stalls with its pipeline full); raising it again resumes with a new frame.
// clear empties the buffer so that a new frame can be loaded; it is
// ignored in the middle of a play-out frame, which keeps the buffer's beat
// count in step with the core's frame slot.
// Serial loading and parallel play-out follow the document; the buffer
// depth of one frame, the cyclic replay and the run/clear controls are this
// design's choices.  Outputs are registered.
module test_module
  import fft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 ser_valid,
  input  logic signed [IW-1:0] ser_re,
  input  logic signed [IW-1:0] ser_im,
  input  logic                 run,
  output logic                 loaded,
  output logic                 out_valid,
  output logic signed [IW-1:0] out_re [LANES],
  output logic signed [IW-1:0] out_im [LANES]
);

  typedef enum logic [1:0] {LOAD, READY, PLAY} state_t;

  state_t            state;
  logic signed [IW-1:0] mem_re [N];
  logic signed [IW-1:0] mem_im [N];
  logic [LOG2N-1:0]  wr_addr;
  logic [4:0]        beat;

  assign loaded = (state != LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= LOAD;
      wr_addr   <= '0;
      beat      <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < int'(N); i++) begin
        mem_re[i] <= '0;
        mem_im[i] <= '0;
      end
      for (int p = 0; p < int'(LANES); p++) begin
        out_re[p] <= '0;
        out_im[p] <= '0;
      end
    end else if (clear && beat == '0) begin
      state     <= LOAD;
      wr_addr   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        LOAD: if (ser_valid) begin
          mem_re[wr_addr] <= ser_re;
          mem_im[wr_addr] <= ser_im;
          wr_addr         <= wr_addr + 1'b1;
          if (wr_addr == LOG2N'(N - 1)) state <= READY;
        end
        READY: if (run) state <= PLAY;
        PLAY: begin
          if (run || beat != '0) begin
            for (int p = 0; p < int'(LANES); p++) begin
              out_re[p] <= mem_re[{beat, 2'(p)}];
              out_im[p] <= mem_im[{beat, 2'(p)}];
            end
            out_valid <= 1'b1;
            beat      <= beat + 1'b1;
          end
        end
        default: state <= LOAD;
      endcase
    end
  end

endmodule
