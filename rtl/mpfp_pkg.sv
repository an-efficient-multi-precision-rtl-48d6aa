// mpfp_pkg: shared types, constants and helper functions of the multi-precision
// floating-point datapath.
//
// Number format (67 bits, most significant first):
//   [66:64] mode select   [63] sign   [62:52] exponent (bias 1023)   [51:0] mantissa
// i.e. an IEEE-754 double with a 3-bit precision tag in front of it. The tag selects
// how many mantissa bits an operation keeps (Table of modes below). Mode 1 ("auto")
// lets the unit pick the narrowest mode that still holds every set mantissa bit of
// its operands; the result is then tagged with the mode that was actually used.
//
// Format, mode codes and the mantissa widths 8/16/23/23/52 follow the document. The
// rules below are this design's own choices:
//   * an operation uses the most precise (highest-coded) mode among its operands;
//     it runs in auto mode only if every operand is tagged auto. Codes 110/111 act
//     as mode 6.
//   * operand mantissas are cut to the mode's width before the arithmetic, and the
//     result mantissa is cut (rounded toward zero) to the same width.
//   * subnormal inputs are read as zero, results below the normal range flush to
//     zero, results above it become infinity; NaN and infinity propagate.
package mpfp_pkg;

  localparam int EXP_W  = 11;
  localparam int MAN_W  = 52;
  localparam int SIG_W  = MAN_W + 1;    // significand with hidden one
  localparam int BIAS   = 1023;
  localparam int EXP_MAX = (1 << EXP_W) - 1;

  // Mantissa width kept in each mode (document values).
  localparam int MODE2_BITS = 8;
  localparam int MODE3_BITS = 16;
  localparam int MODE4_BITS = 23;
  localparam int MODE5_BITS = 23;
  localparam int MODE6_BITS = 52;

  typedef enum logic [2:0] {
    MODE1_AUTO = 3'b000,
    MODE2      = 3'b001,
    MODE3      = 3'b010,
    MODE4      = 3'b011,
    MODE5      = 3'b100,
    MODE6      = 3'b101
  } mode_e;

  typedef struct packed {
    logic [2:0]       mode;
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } mpfp_t;

  typedef struct packed {
    mpfp_t re;
    mpfp_t im;
  } cmpfp_t;

  // Signed working exponent, wide enough for products of two biased exponents.
  typedef logic signed [15:0] wexp_t;
  localparam wexp_t ZERO_EXP = -16'sd8192;  // exponent given to zero operands

  // Complex multiplication structures the unit can be built with.
  typedef enum logic [1:0] {
    CM_CONVENTIONAL = 2'd0,   // 4 multipliers, 1 subtractor, 1 adder
    CM_GOLUB        = 2'd1,   // 3 multipliers, shared d(a-b) product
    CM_FUSED_DOT    = 2'd2,   // two fused dot-product units (ac-bd, bc+ad)
    CM_FUSED_3TERM  = 2'd3    // one three-term fused unit with the Golub terms
  } cmul_method_e;

  // Significand multiplier used inside every floating-point product.
  typedef enum logic {
    MM_KARATSUBA_URDHVA = 1'b0,
    MM_BOOTH_WALLACE    = 1'b1
  } mant_mult_e;

  function automatic int mode_bits(logic [2:0] m);
    case (m)
      3'b001:  return MODE2_BITS;
      3'b010:  return MODE3_BITS;
      3'b011:  return MODE4_BITS;
      3'b100:  return MODE5_BITS;
      default: return MODE6_BITS;
    endcase
  endfunction

  // Keeps the top 'bits' mantissa bits.
  function automatic logic [MAN_W-1:0] man_mask(logic [2:0] m);
    logic [MAN_W-1:0] k;
    int b;
    b = mode_bits(m);
    for (int i = 0; i < MAN_W; i++) k[i] = (i >= MAN_W - b);
    return k;
  endfunction

  // Number of leading mantissa bits needed to hold every set bit.
  function automatic int man_needed(logic [MAN_W-1:0] man);
    int n;
    n = 0;
    for (int i = 0; i < MAN_W; i++) if (man[i] && n == 0) n = MAN_W - i;
    return n;
  endfunction

  function automatic logic [2:0] max_mode(logic [2:0] a, logic [2:0] b);
    return (a > b) ? a : b;
  endfunction

  // Turns a requested mode into the mode actually used. 'need' is the largest
  // man_needed() of the operands and only matters in auto mode.
  function automatic logic [2:0] resolve_mode(logic [2:0] req, int need);
    if (req == MODE1_AUTO) begin
      if (need <= MODE2_BITS)      return MODE2;
      else if (need <= MODE3_BITS) return MODE3;
      else if (need <= MODE4_BITS) return MODE4;
      else if (need <= MODE5_BITS) return MODE5;
      else                         return MODE6;
    end
    if (req > MODE6) return MODE6;
    return req;
  endfunction

  function automatic logic is_zero(logic [EXP_W-1:0] e);  // zero or subnormal
    return e == '0;
  endfunction
  function automatic logic is_inf(logic [EXP_W-1:0] e, logic [MAN_W-1:0] f);
    return (e == EXP_W'(EXP_MAX)) && (f == '0);
  endfunction
  function automatic logic is_nan(logic [EXP_W-1:0] e, logic [MAN_W-1:0] f);
    return (e == EXP_W'(EXP_MAX)) && (f != '0);
  endfunction

  function automatic mpfp_t mk_nan(logic [2:0] m);
    return '{mode: m, sign: 1'b0, exp: EXP_W'(EXP_MAX), man: {1'b1, {(MAN_W-1){1'b0}}}};
  endfunction
  function automatic mpfp_t mk_inf(logic [2:0] m, logic s);
    return '{mode: m, sign: s, exp: EXP_W'(EXP_MAX), man: '0};
  endfunction
  function automatic mpfp_t mk_zero(logic [2:0] m, logic s);
    return '{mode: m, sign: s, exp: '0, man: '0};
  endfunction

  // Packs a normalised result (biased exponent e, 52 fraction bits) in mode m,
  // cutting the mantissa to the mode's width and handling range limits.
  function automatic mpfp_t pack(logic [2:0] m, logic s, wexp_t e, logic [MAN_W-1:0] f);
    if (e >= wexp_t'(EXP_MAX)) return mk_inf(m, s);
    if (e <= 0)                return mk_zero(m, s);
    return '{mode: m, sign: s, exp: e[EXP_W-1:0], man: f & man_mask(m)};
  endfunction

  // Result of a sum x + y when an operand is NaN or infinite (sy already holds
  // the sign y enters the sum with). 'hit' tells whether the special path applies.
  typedef struct packed {
    logic  hit;
    mpfp_t val;
  } special_t;

  function automatic special_t add_special(logic [2:0] m, logic nx, logic ix, logic sx,
                                           logic ny, logic iy, logic sy);
    special_t r;
    r.hit = nx | ny | ix | iy;
    if (nx || ny || (ix && iy && (sx != sy))) r.val = mk_nan(m);
    else if (ix)                              r.val = mk_inf(m, sx);
    else                                      r.val = mk_inf(m, sy);
    return r;
  endfunction

endpackage
