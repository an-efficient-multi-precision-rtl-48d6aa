// fused_dot3: three-term fused dot-product unit, X = A*B +- C*D and
// Y = C*D +- E*F, with the C*D product shared.
//
// Three exact products are formed (fp_prod_exact); C*D feeds both sums, so two
// outputs cost three multipliers. Each output is aligned, summed and rounded once
// (fp_align + fp_sumnorm on 106-bit terms). op[0] selects the sign for X
// (0: +, 1: -) and op[1] the sign for Y. The mode is resolved over all six
// operands.
//
// Interface: a..f (mpfp_t), op (2 bits) -> x, y (mpfp_t). Combinational.
// With A = a, B = c-d, C = d, D = a-b, E = b, F = c+d and op = 00 the unit gives
// the real and imaginary parts of a Golub complex product.
// The unit, its operand pairing, its outputs and the 2-bit operation input are the
// document's; the bit assignment of op and the fused datapath are this design's.
module fused_dot3
  import mpfp_pkg::*;
#(
  parameter mant_mult_e MULT = MM_KARATSUBA_URDHVA
) (
  input  mpfp_t      a,
  input  mpfp_t      b,
  input  mpfp_t      c,
  input  mpfp_t      d,
  input  mpfp_t      e,
  input  mpfp_t      f,
  input  logic [1:0] op,
  output mpfp_t      x,
  output mpfp_t      y
);
  localparam int MW  = 2 * SIG_W;
  localparam int EXT = MW + 3;

  logic [2:0]        mode;
  logic [2:0]        ps, pz, pi, pn;
  wexp_t             pe [3];
  logic [MW-1:0]     pp [3];
  logic              xswap, xs_big, xs_small, yswap, ys_big, ys_small;
  wexp_t             xe_big, ye_big;
  logic [MW+EXT-1:0] xsig_big, xsig_sml, ysig_big, ysig_sml;
  mpfp_t             xsum, ysum;
  special_t          xsp, ysp;

  always_comb begin
    int need;
    need = man_needed(a.man);
    if (man_needed(b.man) > need) need = man_needed(b.man);
    if (man_needed(c.man) > need) need = man_needed(c.man);
    if (man_needed(d.man) > need) need = man_needed(d.man);
    if (man_needed(e.man) > need) need = man_needed(e.man);
    if (man_needed(f.man) > need) need = man_needed(f.man);
    mode = resolve_mode(max_mode(max_mode(max_mode(a.mode, b.mode), max_mode(c.mode, d.mode)),
                                 max_mode(e.mode, f.mode)), need);
  end

  fp_prod_exact #(.MULT(MULT)) u_ab (
    .a, .b, .mode, .sign(ps[0]), .e(pe[0]), .p(pp[0]), .zero(pz[0]), .inf(pi[0]), .nan(pn[0]));
  fp_prod_exact #(.MULT(MULT)) u_cd (
    .a(c), .b(d), .mode, .sign(ps[1]), .e(pe[1]), .p(pp[1]), .zero(pz[1]), .inf(pi[1]), .nan(pn[1]));
  fp_prod_exact #(.MULT(MULT)) u_ef (
    .a(e), .b(f), .mode, .sign(ps[2]), .e(pe[2]), .p(pp[2]), .zero(pz[2]), .inf(pi[2]), .nan(pn[2]));

  fp_align #(.MW(MW), .EXT(EXT)) u_xalign (
    .sa(ps[0]), .ea(pe[0]), .siga(pp[0]), .sb(ps[1] ^ op[0]), .eb(pe[1]), .sigb(pp[1]),
    .swap(xswap), .s_big(xs_big), .s_small(xs_small), .e_big(xe_big),
    .sig_big(xsig_big), .sig_sml(xsig_sml)
  );
  fp_sumnorm #(.MW(MW), .EXT(EXT)) u_xnorm (
    .mode, .s_big(xs_big), .s_small(xs_small), .e_big(xe_big),
    .sig_big(xsig_big), .sig_sml(xsig_sml), .y(xsum)
  );

  fp_align #(.MW(MW), .EXT(EXT)) u_yalign (
    .sa(ps[1]), .ea(pe[1]), .siga(pp[1]), .sb(ps[2] ^ op[1]), .eb(pe[2]), .sigb(pp[2]),
    .swap(yswap), .s_big(ys_big), .s_small(ys_small), .e_big(ye_big),
    .sig_big(ysig_big), .sig_sml(ysig_sml)
  );
  fp_sumnorm #(.MW(MW), .EXT(EXT)) u_ynorm (
    .mode, .s_big(ys_big), .s_small(ys_small), .e_big(ye_big),
    .sig_big(ysig_big), .sig_sml(ysig_sml), .y(ysum)
  );

  assign xsp = add_special(mode, pn[0], pi[0], ps[0], pn[1], pi[1], ps[1] ^ op[0]);
  assign ysp = add_special(mode, pn[1], pi[1], ps[1], pn[2], pi[2], ps[2] ^ op[1]);
  assign x = xsp.hit ? xsp.val : xsum;
  assign y = ysp.hit ? ysp.val : ysum;

  logic unused;
  assign unused = ^{pz, xswap, yswap};
endmodule
