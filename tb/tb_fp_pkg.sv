// tb_fp_pkg: reference helpers shared by the floating-point testbenches.
//
// Everything here is written independently of the RTL: conversions between the
// 67-bit multi-precision format and the simulator's double-precision 'real',
// a mantissa cut to a given width, an own table of mode widths and an own auto-
// mode rule, a random operand generator and a tolerance test that allows for
// round-toward-zero at the mode's width.
package tb_fp_pkg;
  import mpfp_pkg::*;

  function automatic int tb_bits(logic [2:0] m);
    int t [8] = '{52, 8, 16, 23, 23, 52, 52, 52};
    return t[m];
  endfunction

  function automatic logic [51:0] tb_mask(int bits);
    return ~(52'hF_FFFF_FFFF_FFFF >> bits);
  endfunction

  function automatic int tb_need(logic [51:0] f);
    for (int b = 0; b <= 52; b++) if ((f & ~tb_mask(b)) == 0) return b;
    return 52;
  endfunction

  // Mode actually used for a list of operands (own formulation of the rule).
  function automatic logic [2:0] tb_mode(mpfp_t ops [], int n);
    logic [2:0] req;
    int need;
    req = 0;
    need = 0;
    for (int i = 0; i < n; i++) begin
      if (ops[i].mode > req) req = ops[i].mode;
      if (tb_need(ops[i].man) > need) need = tb_need(ops[i].man);
    end
    if (req >= 5) return 3'd5;
    if (req != 0) return req;
    if (need <= 8)  return 3'd1;
    if (need <= 16) return 3'd2;
    if (need <= 23) return 3'd3;
    return 3'd5;
  endfunction

  function automatic real to_r(mpfp_t x);
    if (x.exp == 0) return 0.0;
    return $bitstoreal({x.sign, x.exp, x.man});
  endfunction

  function automatic mpfp_t from_r(real v, logic [2:0] m);
    logic [63:0] b;
    b = $realtobits(v);
    return {m, b};
  endfunction

  // Operand as the unit sees it in mode m (mantissa cut to the mode's width).
  function automatic real cut_r(mpfp_t x, logic [2:0] m);
    mpfp_t y;
    y = x;
    y.man = x.man & tb_mask(tb_bits(m));
    return to_r(y);
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // got must lie within one unit of the last kept place (at 'bits' mantissa
  // bits) of want, plus a little for the rounding of want itself and 'slack'
  // (an absolute allowance for results that suffer cancellation).
  function automatic bit near(real got, real want, int bits, real slack);
    real ulp;
    ulp = absr(want) * (2.0 ** (-bits)) * 2.0;
    return absr(got - want) <= ulp + slack + absr(want) * 1.0e-15;
  endfunction

  function automatic mpfp_t rnd_fp(logic [2:0] m, int erange);
    mpfp_t x;
    x.mode = m;
    x.sign = 1'($urandom);
    x.exp  = 11'(1023 + int'($urandom_range(0, 2 * erange)) - erange);
    x.man  = {20'($urandom), 32'($urandom)};
    return x;
  endfunction
endpackage
