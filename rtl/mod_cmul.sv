// mod_cmul: the modified complex multiplier after the radix-8 butterflies of
// the second module.  It applies the inter-stage twiddles W64^(m2*l1) to the
// four data paths at once, using constant multipliers shared by the paths
// instead of four general complex multipliers.
//
// Lane p in slot s holds the BU8 output for m2 = 4*s[0] + p and
// l1 = bitrev3(s[3:1]), so the twiddle exponent E = m2*l1 mod 64 is known
// from the slot.  Every exponent is mapped to region A, the first octant:
// a = E mod 16 when that is <= 8, else 16 - (E mod 16).  a = 0 is the
// trivial factor 1; a = 1..8 selects one of eight constant multipliers
// (const_cmul) holding cos and sin of a/64 of a turn.  In every slot the
// four lanes need different constants, except in slots 2 and 3 of each
// 16-slot group, where lanes 1 and 3 both need a = 4; a ninth, duplicate
// multiplier for a = 4 serves lane 3 then, so no extra cycle is spent.  A
// crossbar routes each lane to its multiplier and back.  The lane then
// forms x*(C - jS) (E mod 16 <= 8) or x*(S - jC) (otherwise) from the four
// products by choosing signs, rounds, and rotates by (-j)^(E div 16) by
// swapping real and imaginary parts.
// The region-A mapping, the eight constant sets, the duplicate constant
// multiplier 4 and the swap/sign trick follow the document; the crossbar
// and the rounding are this design's choices.  Output registered, width W.
module mod_cmul
  import fft_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [4:0]          in_slot,
  input  logic signed [W-1:0] in_re  [LANES],
  input  logic signed [W-1:0] in_im  [LANES],
  output logic [4:0]          out_slot,
  output logic signed [W-1:0] out_re [LANES],
  output logic signed [W-1:0] out_im [LANES]
);

  localparam int unsigned PW  = W + CW + 1;
  localparam int unsigned NCM = 9;          // constants 1..8 plus a second 4
  localparam logic signed [PW-1:0] HALF = PW'(1 <<< (CFRAC - 1));

  // region-A constant of multiplier m: a = m + 1, and 4 for the duplicate
  function automatic int cm_a(input int m);
    return (m < 8) ? m + 1 : 4;
  endfunction

  logic [3:0]  a    [LANES];
  logic        swap [LANES];
  logic [1:0]  q    [LANES];
  logic [3:0]  lane_cm [LANES];   // multiplier serving each lane
  logic [1:0]  cm_src  [NCM];     // lane feeding each multiplier
  logic        cm_busy [NCM];

  logic signed [W-1:0]  cm_xr [NCM], cm_xi [NCM];
  logic signed [PW-1:0] xrc [NCM], xis [NCM], xrs [NCM], xic [NCM];
  logic signed [W-1:0]  y_re [LANES], y_im [LANES];

  // exponents and region-A mapping
  always_comb begin
    for (int p = 0; p < int'(LANES); p++) begin
      logic [2:0] m2, l1;
      logic [5:0] e;
      m2      = {in_slot[0], 2'(p)};
      l1      = bitrev3(in_slot[3:1]);
      e       = 6'(m2 * l1);
      q[p]    = e[5:4];
      swap[p] = (e[3:0] > 4'd8);
      a[p]    = swap[p] ? 4'd0 - e[3:0] : e[3:0];   // 16 - r in four bits
    end
  end

  // crossbar: give every lane with a non-trivial constant its multiplier
  always_comb begin
    for (int m = 0; m < int'(NCM); m++) begin
      cm_src[m]  = '0;
      cm_busy[m] = 1'b0;
    end
    for (int p = 0; p < int'(LANES); p++) begin
      lane_cm[p] = '0;
      if (a[p] != '0) begin
        if (a[p] == 4'd4 && cm_busy[3]) lane_cm[p] = 4'(NCM - 1);
        else                            lane_cm[p] = a[p] - 4'd1;
        // the schedule never needs one constant multiplier twice in a slot
        assert (!cm_busy[lane_cm[p]])
          else $error("constant multiplier %0d claimed twice", lane_cm[p]);
        cm_busy[lane_cm[p]] = 1'b1;
        cm_src[lane_cm[p]]  = 2'(p);
      end
    end
    for (int m = 0; m < int'(NCM); m++) begin
      cm_xr[m] = in_re[cm_src[m]];
      cm_xi[m] = in_im[cm_src[m]];
    end
  end

  for (genvar m = 0; m < int'(NCM); m++) begin : g_cm
    const_cmul #(
      .W  (W),
      .C  (COSQ[2 * cm_a(m)]),
      .S  (COSQ[32 - 2 * cm_a(m)]),
      .PW (PW)
    ) u_cm (
      .x_re (cm_xr[m]),
      .x_im (cm_xi[m]),
      .xr_c (xrc[m]),
      .xi_s (xis[m]),
      .xr_s (xrs[m]),
      .xi_c (xic[m])
    );
  end

  // per lane: signs and swap, rounding, rotation by (-j)^q
  always_comb begin
    for (int p = 0; p < int'(LANES); p++) begin
      logic signed [PW-1:0] pr, pi;
      logic signed [W-1:0]  tr, ti;
      if (a[p] == '0) begin
        pr = PW'(in_re[p]) <<< CFRAC;
        pi = PW'(in_im[p]) <<< CFRAC;
      end else if (!swap[p]) begin
        pr = xrc[lane_cm[p]] + xis[lane_cm[p]];
        pi = xic[lane_cm[p]] - xrs[lane_cm[p]];
      end else begin
        pr = xrs[lane_cm[p]] + xic[lane_cm[p]];
        pi = xis[lane_cm[p]] - xrc[lane_cm[p]];
      end
      tr = W'((pr + HALF) >>> CFRAC);
      ti = W'((pi + HALF) >>> CFRAC);
      unique case (q[p])
        2'd0: begin y_re[p] = tr;  y_im[p] = ti;  end
        2'd1: begin y_re[p] = ti;  y_im[p] = -tr; end
        2'd2: begin y_re[p] = -tr; y_im[p] = -ti; end
        default: begin y_re[p] = -ti; y_im[p] = tr; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(LANES); p++) begin
        out_re[p] <= '0;
        out_im[p] <= '0;
      end
      out_slot <= '0;
    end else if (en) begin
      for (int p = 0; p < int'(LANES); p++) begin
        out_re[p] <= y_re[p];
        out_im[p] <= y_im[p];
      end
      out_slot <= in_slot;
    end
  end

endmodule
