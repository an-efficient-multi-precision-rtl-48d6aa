// fused_dot2: fused floating-point dot-product unit, Y = A*B + C*D or A*B - C*D
// with a single rounding.
//
// Both products are formed exactly (fp_prod_exact, 106-bit significands, no
// normalisation and no rounding), then aligned and summed as 106-bit terms and
// rounded once, when the result is cut to the mode's width. This saves the
// intermediate rounding of each product and the separate normalise/pack logic of
// two multipliers and an adder. The mode is resolved over all four operands.
//
// Interface: a, b, c, d (mpfp_t), op (0: AB + CD, 1: AB - CD) -> y (mpfp_t).
// Combinational.
// The unit, its operands and its 1-bit operation input are the document's; the
// fused datapath inside (exact products, one truncation) is this design's reading
// of "fused".
module fused_dot2
  import mpfp_pkg::*;
#(
  parameter mant_mult_e MULT = MM_KARATSUBA_URDHVA
) (
  input  mpfp_t a,
  input  mpfp_t b,
  input  mpfp_t c,
  input  mpfp_t d,
  input  logic  op,
  output mpfp_t y
);
  localparam int MW  = 2 * SIG_W;
  localparam int EXT = MW + 3;

  logic [2:0]        mode;
  logic              s1, s2, z1, z2, i1, i2, n1, n2, swap, s_big, s_small;
  wexp_t             e1, e2, e_big;
  logic [MW-1:0]     p1, p2;
  logic [MW+EXT-1:0] sig_big, sig_sml;
  mpfp_t             sum;
  special_t          sp;

  always_comb begin
    int need;
    need = man_needed(a.man);
    if (man_needed(b.man) > need) need = man_needed(b.man);
    if (man_needed(c.man) > need) need = man_needed(c.man);
    if (man_needed(d.man) > need) need = man_needed(d.man);
    mode = resolve_mode(max_mode(max_mode(a.mode, b.mode), max_mode(c.mode, d.mode)), need);
  end

  fp_prod_exact #(.MULT(MULT)) u_ab (
    .a, .b, .mode, .sign(s1), .e(e1), .p(p1), .zero(z1), .inf(i1), .nan(n1));
  fp_prod_exact #(.MULT(MULT)) u_cd (
    .a(c), .b(d), .mode, .sign(s2), .e(e2), .p(p2), .zero(z2), .inf(i2), .nan(n2));

  fp_align #(.MW(MW), .EXT(EXT)) u_align (
    .sa(s1), .ea(e1), .siga(p1), .sb(s2 ^ op), .eb(e2), .sigb(p2),
    .swap, .s_big, .s_small, .e_big, .sig_big, .sig_sml
  );
  fp_sumnorm #(.MW(MW), .EXT(EXT)) u_norm (
    .mode, .s_big, .s_small, .e_big, .sig_big, .sig_sml, .y(sum)
  );

  assign sp = add_special(mode, n1, i1, s1, n2, i2, s2 ^ op);
  assign y  = sp.hit ? sp.val : sum;

  // Zero products carry no sign information beyond what fp_sumnorm gives.
  logic unused;
  assign unused = z1 ^ z2;
endmodule
