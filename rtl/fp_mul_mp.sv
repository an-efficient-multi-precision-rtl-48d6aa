// fp_mul_mp: multi-precision floating-point multiplier (the six-mode multiplier).
//
// The mode used is the most precise one among the two operand tags; in auto mode
// (both tags 000) it is the narrowest of modes 2..6 whose mantissa width holds
// every set mantissa bit of both operands. The exact product comes from
// fp_prod_exact (XOR sign, exponent addition, significand product on the cut
// significands). A product of 2 or more is shifted right by one with the exponent
// incremented; the 52 bits below the leading one are then cut to the mode's width
// (round toward zero) and packed with the resolved mode in the tag.
//
// Interface: a, b (mpfp_t) -> y (mpfp_t). Purely combinational.
// The modes, the sign/exponent/mantissa split and the choice of significand
// multiplier (MULT) follow the document; the auto rule, the tag rule, rounding and
// range handling are this design's (see mpfp_pkg).
module fp_mul_mp
  import mpfp_pkg::*;
#(
  parameter mant_mult_e MULT = MM_KARATSUBA_URDHVA
) (
  input  mpfp_t a,
  input  mpfp_t b,
  output mpfp_t y
);
  logic [2:0]         mode;
  logic               s, zero, inf, nan;
  wexp_t              e;
  logic [2*SIG_W-1:0] p;

  always_comb begin
    int need;
    need = man_needed(a.man);
    if (man_needed(b.man) > need) need = man_needed(b.man);
    mode = resolve_mode(max_mode(a.mode, b.mode), need);
  end

  fp_prod_exact #(.MULT(MULT)) u_prod (
    .a, .b, .mode, .sign(s), .e, .p, .zero, .inf, .nan
  );

  always_comb begin
    if (nan)       y = mk_nan(mode);
    else if (inf)  y = mk_inf(mode, s);
    else if (zero) y = mk_zero(mode, s);
    else if (p[2*SIG_W-1]) y = pack(mode, s, e + 1, p[2*SIG_W-2 -: MAN_W]);
    else                   y = pack(mode, s, e,     p[2*SIG_W-3 -: MAN_W]);
  end
endmodule
