// fp_prod_exact: exact product of two multi-precision floating-point numbers,
// before any normalisation or rounding.
//
// Sign: XOR of the operand signs. Exponent: sum of the biased exponents minus the
// bias. Significand: the two 53-bit significands (hidden one plus the mantissa
// cut to the width of the resolved mode) multiplied by the selected significand
// multiplier into a 106-bit product with two integer bits, so that
//   value = p / 2^104 * 2^(e - 1023).
// Zero (or subnormal) operands give p = 0 and e = ZERO_EXP; NaN and infinity are
// reported as flags (NaN also for infinity times zero) for the caller to resolve.
// The plain multiplier packs this result; the fused units add such products
// before their single rounding step.
//
// Interface: a, b, mode (already resolved, never auto) -> sign, e, p, zero, inf,
// nan. Purely combinational. Sign, exponent and significand steps follow the
// document; flag handling is this design's.
module fp_prod_exact
  import mpfp_pkg::*;
#(
  parameter mant_mult_e MULT = MM_KARATSUBA_URDHVA
) (
  input  mpfp_t              a,
  input  mpfp_t              b,
  input  logic [2:0]         mode,
  output logic               sign,
  output wexp_t              e,
  output logic [2*SIG_W-1:0] p,
  output logic               zero,
  output logic               inf,
  output logic               nan
);
  logic [SIG_W-1:0]   sa, sb;
  logic [2*SIG_W-1:0] prod;

  assign sa = {1'b1, a.man & man_mask(mode)};
  assign sb = {1'b1, b.man & man_mask(mode)};

  if (MULT == MM_BOOTH_WALLACE) begin : g_booth
    booth_wallace_mult #(.W(SIG_W)) u_mult (.a(sa), .b(sb), .p(prod));
  end else begin : g_kara
    karatsuba_mult #(.W(SIG_W), .BASE_W(16)) u_mult (.a(sa), .b(sb), .p(prod));
  end

  always_comb begin
    sign = a.sign ^ b.sign;
    nan  = is_nan(a.exp, a.man) || is_nan(b.exp, b.man) || (is_inf(a.exp, a.man) && is_zero(b.exp)) || (is_zero(a.exp) && is_inf(b.exp, b.man));
    inf  = !nan && (is_inf(a.exp, a.man) || is_inf(b.exp, b.man));
    zero = !nan && !inf && (is_zero(a.exp) || is_zero(b.exp));
    if (zero || nan || inf) begin
      e = ZERO_EXP;
      p = '0;
    end else begin
      e = wexp_t'(a.exp) + wexp_t'(b.exp) - wexp_t'(BIAS);
      p = prod;
    end
  end
endmodule
