// fp_addsub: multi-precision floating-point adder/subtractor, y = a + b or a - b.
//
// The mode is resolved as in fp_mul_mp (most precise operand tag, auto picks the
// narrowest mode that holds both mantissas). Both mantissas are cut to that mode's
// width, the terms are aligned (fp_align) and summed, normalised and packed
// (fp_sumnorm) with one truncation to the mode's width. NaN and infinity operands
// bypass the arithmetic (infinity minus infinity gives NaN).
//
// Interface: a, b (mpfp_t), sub (1 = subtract) -> y (mpfp_t). Combinational.
// These are the "+" and "-" boxes of the complex multiplier structures; the
// document shows them but not their insides, so the adder design is this one's.
module fp_addsub
  import mpfp_pkg::*;
(
  input  mpfp_t a,
  input  mpfp_t b,
  input  logic  sub,
  output mpfp_t y
);
  localparam int MW  = SIG_W + 1;
  localparam int EXT = MW + 3;

  logic [2:0]        mode;
  wexp_t             ea, eb, e_big;
  logic [MW-1:0]     siga, sigb;
  logic              sb, swap, s_big, s_small;
  logic [MW+EXT-1:0] sig_big, sig_sml;
  mpfp_t             sum;
  special_t          sp;

  always_comb begin
    int need;
    need = man_needed(a.man);
    if (man_needed(b.man) > need) need = man_needed(b.man);
    mode = resolve_mode(max_mode(a.mode, b.mode), need);
    sb   = b.sign ^ sub;
    ea   = is_zero(a.exp) ? ZERO_EXP : wexp_t'(a.exp);
    eb   = is_zero(b.exp) ? ZERO_EXP : wexp_t'(b.exp);
    siga = is_zero(a.exp) ? '0 : {2'b01, a.man & man_mask(mode)};
    sigb = is_zero(b.exp) ? '0 : {2'b01, b.man & man_mask(mode)};
    sp   = add_special(mode, is_nan(a.exp, a.man), is_inf(a.exp, a.man), a.sign,
                       is_nan(b.exp, b.man), is_inf(b.exp, b.man), sb);
  end

  fp_align #(.MW(MW), .EXT(EXT)) u_align (
    .sa(a.sign), .ea, .siga, .sb, .eb, .sigb,
    .swap, .s_big, .s_small, .e_big, .sig_big, .sig_sml
  );

  fp_sumnorm #(.MW(MW), .EXT(EXT)) u_norm (
    .mode, .s_big, .s_small, .e_big, .sig_big, .sig_sml, .y(sum)
  );

  assign y = sp.hit ? sp.val : sum;
endmodule
