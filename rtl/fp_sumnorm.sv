// fp_sumnorm: signed addition, normalisation and packing for a floating-point sum
// of two aligned terms (from fp_align).
//
// On equal signs the magnitudes are added, on different signs the sig_sml one is
// subtracted from the sig_big one and a negative difference is negated, which also
// flips the result sign. The leading one of the exact result is found, the result
// is shifted so that it becomes the hidden bit, the biased exponent is adjusted by
// the shift, and the 52 fraction bits below it are cut to the width of the mode
// (round toward zero, made exact by the sticky bit) before packing. A zero result
// is +0 unless both terms were negative.
//
// Interface: mode (resolved), s_big, s_small, e_big, sig_big, sig_sml -> y (finite
// result only; the caller overlays NaN and infinity). Purely combinational.
// The document does not describe its adders: this block is this design's.
module fp_sumnorm
  import mpfp_pkg::*;
#(
  parameter int MW  = 54,
  parameter int EXT = 57
) (
  input  logic [2:0]        mode,
  input  logic              s_big,
  input  logic              s_small,
  input  wexp_t             e_big,
  input  logic [MW+EXT-1:0] sig_big,
  input  logic [MW+EXT-1:0] sig_sml,
  output mpfp_t             y
);
  localparam int AW = MW + EXT;
  localparam int RW = AW + 1;

  always_comb begin
    logic [RW-1:0] r, norm;
    logic          s;
    int            q;
    wexp_t         ey;
    if (s_big == s_small) begin
      r = RW'(sig_big) + RW'(sig_sml);
      s = s_big;
    end else begin
      r = RW'(sig_big) - RW'(sig_sml);
      s = s_big;
      if (r[RW-1]) begin
        r = -r;
        s = s_small;
      end
    end
    q = -1;
    for (int i = 0; i < RW; i++) if (r[i]) q = i;
    if (q < 0) begin
      norm = '0;
      ey   = '0;
      y    = mk_zero(mode, s_big & s_small);
    end else begin
      norm = r << (RW - 1 - q);
      ey   = e_big + wexp_t'(q) - wexp_t'(MW - 2 + EXT);
      y    = pack(mode, s, ey, norm[RW-2 -: MAN_W]);
    end
  end
endmodule
