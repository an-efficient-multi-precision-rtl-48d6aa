// cbfly: complex floating-point butterfly, x = a + b and y = a - b.
//
// One fused add-subtract unit for the real parts and one for the imaginary parts,
// so each part's sum and difference share one alignment.
//
// Interface: a, b (cmpfp_t) -> x, y (cmpfp_t). Combinational.
// Built from the document's fused add-subtract unit; the complex pairing is this
// design's.
module cbfly
  import mpfp_pkg::*;
(
  input  cmpfp_t a,
  input  cmpfp_t b,
  output cmpfp_t x,
  output cmpfp_t y
);
  fused_addsub u_re (.a(a.re), .b(b.re), .op(1'b0), .x(x.re), .y(y.re));
  fused_addsub u_im (.a(a.im), .b(b.im), .op(1'b0), .x(x.im), .y(y.im));
endmodule
