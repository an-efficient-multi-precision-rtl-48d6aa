// fused_addsub: fused floating-point add-subtract unit, X = A + B and Y = A - B
// from one shared alignment.
//
// A butterfly needs the sum and the difference of the same two operands. Both
// share the mode resolution, the exponent comparison and the alignment shift
// (one fp_align); only the final add/subtract, normalisation and packing are
// doubled (two fp_sumnorm). The 1-bit operation input picks the order of the
// difference: op = 0 gives Y = A - B, op = 1 gives Y = B - A.
//
// Interface: a, b (mpfp_t), op -> x, y (mpfp_t). Combinational. Results equal
// those of two fp_addsub units.
// The unit, its X/Y outputs and its 1-bit operation input are the document's; what
// the operation bit does is not stated there and is this design's choice.
module fused_addsub
  import mpfp_pkg::*;
(
  input  mpfp_t a,
  input  mpfp_t b,
  input  logic  op,
  output mpfp_t x,
  output mpfp_t y
);
  localparam int MW  = SIG_W + 1;
  localparam int EXT = MW + 3;

  logic [2:0]        mode;
  wexp_t             ea, eb, e_big;
  logic [MW-1:0]     siga, sigb;
  logic              swap, s_big, s_small, ys_big, ys_small;
  logic [MW+EXT-1:0] sig_big, sig_sml;
  mpfp_t             sum, dif, dif_o;
  special_t          sp_x, sp_y;

  always_comb begin
    int need;
    need = man_needed(a.man);
    if (man_needed(b.man) > need) need = man_needed(b.man);
    mode = resolve_mode(max_mode(a.mode, b.mode), need);
    ea   = is_zero(a.exp) ? ZERO_EXP : wexp_t'(a.exp);
    eb   = is_zero(b.exp) ? ZERO_EXP : wexp_t'(b.exp);
    siga = is_zero(a.exp) ? '0 : {2'b01, a.man & man_mask(mode)};
    sigb = is_zero(b.exp) ? '0 : {2'b01, b.man & man_mask(mode)};
    sp_x = add_special(mode, is_nan(a.exp, a.man), is_inf(a.exp, a.man), a.sign,
                       is_nan(b.exp, b.man), is_inf(b.exp, b.man), b.sign);
    sp_y = add_special(mode, is_nan(a.exp, a.man), is_inf(a.exp, a.man), a.sign,
                       is_nan(b.exp, b.man), is_inf(b.exp, b.man), ~b.sign);
  end

  fp_align #(.MW(MW), .EXT(EXT)) u_align (
    .sa(a.sign), .ea, .siga, .sb(b.sign), .eb, .sigb,
    .swap, .s_big, .s_small, .e_big, .sig_big, .sig_sml
  );

  // For the difference, B enters with its sign inverted.
  assign ys_big   = swap ? ~b.sign : a.sign;
  assign ys_small = swap ? a.sign : ~b.sign;

  fp_sumnorm #(.MW(MW), .EXT(EXT)) u_sum (
    .mode, .s_big, .s_small, .e_big, .sig_big, .sig_sml, .y(sum)
  );
  fp_sumnorm #(.MW(MW), .EXT(EXT)) u_dif (
    .mode, .s_big(ys_big), .s_small(ys_small), .e_big, .sig_big, .sig_sml, .y(dif)
  );

  // B - A = -(A - B); an exact zero stays +0.
  always_comb begin
    dif_o = sp_y.hit ? sp_y.val : dif;
    if (op && !is_nan(dif_o.exp, dif_o.man) && !is_zero(dif_o.exp)) dif_o.sign = ~dif_o.sign;
  end

  assign x = sp_x.hit ? sp_x.val : sum;
  assign y = dif_o;
endmodule
