// cmul_mp: multi-precision floating-point complex multiplier, the twiddle factor
// multiplier of the FFT: (a + jb) x (c + jd) = (ac - bd) + j(bc + ad).
//
// METHOD picks one of the complex multiplication structures:
//   CM_CONVENTIONAL  four multipliers ac, bd, bc, ad, one subtractor, one adder.
//   CM_GOLUB         real = a(c-d) + d(a-b), imag = d(a-b) + b(c+d): three
//                    multipliers, pre-adders c-d, a-b, c+d and two post-adders.
//   CM_FUSED_DOT     two fused dot-product units, ac - bd and bc + ad, each with
//                    one rounding.
//   CM_FUSED_3TERM   the Golub pre-adders followed by one three-term fused unit
//                    (X = AB + CD, Y = CD + EF with C*D = d(a-b) shared).
// MULT picks the significand multiplier used in every product (Karatsuba-Urdhva
// or Booth encoded Wallace tree). All operands carry their precision mode tag;
// each floating-point operation resolves its mode from its operands.
//
// Interface: x = a + jb (data), w = c + jd (twiddle) -> y. Combinational.
// The four structures and the two significand multipliers come from the document;
// the default (Golub with Karatsuba-Urdhva) is this design's choice, since the
// document compares the combinations without naming a winner.
module cmul_mp
  import mpfp_pkg::*;
#(
  parameter cmul_method_e METHOD = CM_GOLUB,
  parameter mant_mult_e   MULT   = MM_KARATSUBA_URDHVA
) (
  input  cmpfp_t x,
  input  cmpfp_t w,
  output cmpfp_t y
);
  if (METHOD == CM_CONVENTIONAL) begin : g_conv
    mpfp_t ac, bd, bc, ad;
    fp_mul_mp #(.MULT(MULT)) u_ac (.a(x.re), .b(w.re), .y(ac));
    fp_mul_mp #(.MULT(MULT)) u_bd (.a(x.im), .b(w.im), .y(bd));
    fp_mul_mp #(.MULT(MULT)) u_bc (.a(x.im), .b(w.re), .y(bc));
    fp_mul_mp #(.MULT(MULT)) u_ad (.a(x.re), .b(w.im), .y(ad));
    fp_addsub u_re (.a(ac), .b(bd), .sub(1'b1), .y(y.re));
    fp_addsub u_im (.a(bc), .b(ad), .sub(1'b0), .y(y.im));
  end else if (METHOD == CM_GOLUB) begin : g_golub
    mpfp_t c_m_d, a_m_b, c_p_d, m1, m2, m3;
    fp_addsub u_cmd (.a(w.re), .b(w.im), .sub(1'b1), .y(c_m_d));
    fp_addsub u_amb (.a(x.re), .b(x.im), .sub(1'b1), .y(a_m_b));
    fp_addsub u_cpd (.a(w.re), .b(w.im), .sub(1'b0), .y(c_p_d));
    fp_mul_mp #(.MULT(MULT)) u_m1 (.a(x.re), .b(c_m_d), .y(m1));
    fp_mul_mp #(.MULT(MULT)) u_m2 (.a(w.im), .b(a_m_b), .y(m2));
    fp_mul_mp #(.MULT(MULT)) u_m3 (.a(x.im), .b(c_p_d), .y(m3));
    fp_addsub u_re (.a(m1), .b(m2), .sub(1'b0), .y(y.re));
    fp_addsub u_im (.a(m2), .b(m3), .sub(1'b0), .y(y.im));
  end else if (METHOD == CM_FUSED_DOT) begin : g_dot
    fused_dot2 #(.MULT(MULT)) u_re (
      .a(x.re), .b(w.re), .c(x.im), .d(w.im), .op(1'b1), .y(y.re));
    fused_dot2 #(.MULT(MULT)) u_im (
      .a(x.im), .b(w.re), .c(x.re), .d(w.im), .op(1'b0), .y(y.im));
  end else begin : g_dot3
    mpfp_t c_m_d, a_m_b, c_p_d;
    fp_addsub u_cmd (.a(w.re), .b(w.im), .sub(1'b1), .y(c_m_d));
    fp_addsub u_amb (.a(x.re), .b(x.im), .sub(1'b1), .y(a_m_b));
    fp_addsub u_cpd (.a(w.re), .b(w.im), .sub(1'b0), .y(c_p_d));
    fused_dot3 #(.MULT(MULT)) u_dot (
      .a(x.re), .b(c_m_d), .c(w.im), .d(a_m_b), .e(x.im), .f(c_p_d),
      .op(2'b00), .x(y.re), .y(y.im));
  end
endmodule
