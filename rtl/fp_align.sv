// fp_align: exponent comparison and significand alignment for a floating-point
// sum of two terms.
//
// Each term is (sign, biased exponent e, significand sig of MW bits with two
// integer bits): value = sig / 2^(MW-2) * 2^(e-1023). The term with the larger
// exponent becomes "big"; the other is shifted right by the exponent difference.
// Both are first extended by EXT fraction bits; bits shifted out past the end are
// ORed into the least significant bit (sticky), which keeps a later truncation
// exact. The magnitude order is settled in fp_sumnorm, not here.
//
// Interface: (sa, ea, siga), (sb, eb, sigb) -> swap (b had the larger exponent),
// s_big, s_small, e_big, sig_big, sig_sml (MW+EXT bits). Purely combinational.
// Alignment by exponent difference is standard floating-point practice; the
// document does not describe its adders, so the whole block is this design's.
module fp_align
  import mpfp_pkg::*;
#(
  parameter int MW  = 54,
  parameter int EXT = 57
) (
  input  logic             sa,
  input  wexp_t            ea,
  input  logic [MW-1:0]    siga,
  input  logic             sb,
  input  wexp_t            eb,
  input  logic [MW-1:0]    sigb,
  output logic             swap,
  output logic             s_big,
  output logic             s_small,
  output wexp_t            e_big,
  output logic [MW+EXT-1:0] sig_big,
  output logic [MW+EXT-1:0] sig_sml
);
  localparam int AW = MW + EXT;

  always_comb begin
    logic [AW-1:0] sm, shifted;
    logic          sticky;
    wexp_t         d;
    swap    = eb > ea;
    s_big   = swap ? sb : sa;
    s_small = swap ? sa : sb;
    e_big   = swap ? eb : ea;
    d       = swap ? eb - ea : ea - eb;
    sig_big     = {(swap ? sigb : siga), {EXT{1'b0}}};
    sm      = {(swap ? siga : sigb), {EXT{1'b0}}};
    if (d >= wexp_t'(AW)) begin
      shifted = '0;
      sticky  = |sm;
    end else begin
      shifted = sm >> d;
      sticky  = |(sm & ~({AW{1'b1}} << d));
    end
    sig_sml = shifted | AW'(sticky);
  end
endmodule
