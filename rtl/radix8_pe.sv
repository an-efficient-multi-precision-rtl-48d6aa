// radix8_pe: processing element of the mixed radix-2/radix-8 decimation-in-time
// FFT. One call computes either one radix-8 butterfly or four radix-2 butterflies.
//
// Radix-8 (radix2 = 0): inputs 1..7 are first multiplied by their twiddle factors
// (seven cmul_mp units, DIT order: twiddle before butterfly), then the 8-point DFT
// X_k = sum_m t_m W8^(mk) is formed in three radix-2 layers:
//   layer 1  pairs (t0,t4) (t2,t6) (t1,t5) (t3,t7)
//   layer 2  4-point combines of the even and the odd half; the factor -j is a
//            swap of real and imaginary part with one sign change (no multiplier)
//   layer 3  X_k = E_k + W8^k O_k, X_(k+4) = E_k - W8^k O_k; W8^1 = (1-j)/sqrt2 and
//            W8^3 = -(1+j)/sqrt2 use two more cmul_mp units with constant factors.
// Radix-2 (radix2 = 1): the layer-1 butterflies take the adjacent pairs (x0,x1),
// (x2,x3), (x4,x5), (x6,x7) instead and their results are the outputs
// (y[2i] = x[2i] + x[2i+1], y[2i+1] = x[2i] - x[2i+1]); twiddles are not used.
// The constants are tagged with 'mode' like the twiddles.
//
// Interface: radix2, mode, x[8], w[8] (w[0] unused) -> y[8]. Combinational.
// Mixed radix-2/radix-8 DIT and the DIT butterfly X = A + BW, Y = A - BW are the
// document's; this way of sharing one element between both radices is this
// design's.
module radix8_pe
  import mpfp_pkg::*;
#(
  parameter cmul_method_e METHOD = CM_GOLUB,
  parameter mant_mult_e   MULT   = MM_KARATSUBA_URDHVA
) (
  input  logic       radix2,
  input  logic [2:0] mode,
  input  cmpfp_t     x [8],
  input  cmpfp_t     w [8],
  output cmpfp_t     y [8]
);
  localparam logic [63:0] RSQRT2 = 64'h3FE6A09E667F3BCD;   // 1/sqrt(2)

  cmpfp_t t  [8];
  cmpfp_t l1a[4], l1b[4], l1x[4], l1y[4];
  cmpfp_t e  [4], o [4], ow[4];
  cmpfp_t b1j, d1j;
  cmpfp_t w81, w83;

  function automatic cmpfp_t mul_mj(cmpfp_t v);   // v * (-j)
    cmpfp_t r;
    r.re = v.im;
    r.im = v.re;
    r.im.sign = ~v.re.sign;
    return r;
  endfunction

  // Twiddle multiplication of inputs 1..7.
  assign t[0] = x[0];
  for (genvar m = 1; m < 8; m++) begin : g_tw
    cmul_mp #(.METHOD(METHOD), .MULT(MULT)) u_tw (.x(x[m]), .w(w[m]), .y(t[m]));
  end

  // Layer 1: radix-8 pairs or the four adjacent radix-2 pairs.
  always_comb begin
    if (radix2) begin
      for (int i = 0; i < 4; i++) begin
        l1a[i] = x[2*i];
        l1b[i] = x[2*i+1];
      end
    end else begin
      l1a[0] = t[0]; l1b[0] = t[4];
      l1a[1] = t[2]; l1b[1] = t[6];
      l1a[2] = t[1]; l1b[2] = t[5];
      l1a[3] = t[3]; l1b[3] = t[7];
    end
  end
  for (genvar i = 0; i < 4; i++) begin : g_l1
    cbfly u_bf (.a(l1a[i]), .b(l1b[i]), .x(l1x[i]), .y(l1y[i]));
  end

  // Layer 2: 4-point DFTs of the even (pairs 0,1) and odd (pairs 2,3) halves.
  assign b1j = mul_mj(l1y[1]);
  assign d1j = mul_mj(l1y[3]);
  cbfly u_e02 (.a(l1x[0]), .b(l1x[1]), .x(e[0]), .y(e[2]));
  cbfly u_e13 (.a(l1y[0]), .b(b1j),    .x(e[1]), .y(e[3]));
  cbfly u_o02 (.a(l1x[2]), .b(l1x[3]), .x(o[0]), .y(o[2]));
  cbfly u_o13 (.a(l1y[2]), .b(d1j),    .x(o[1]), .y(o[3]));

  // Layer 3: odd half times W8^k, then the final butterflies.
  assign w81.re = {mode, 1'b0, RSQRT2[62:0]};
  assign w81.im = {mode, 1'b1, RSQRT2[62:0]};
  assign w83.re = {mode, 1'b1, RSQRT2[62:0]};
  assign w83.im = {mode, 1'b1, RSQRT2[62:0]};
  assign ow[0] = o[0];
  assign ow[2] = mul_mj(o[2]);
  cmul_mp #(.METHOD(METHOD), .MULT(MULT)) u_w81 (.x(o[1]), .w(w81), .y(ow[1]));
  cmul_mp #(.METHOD(METHOD), .MULT(MULT)) u_w83 (.x(o[3]), .w(w83), .y(ow[3]));

  cmpfp_t r8 [8];
  for (genvar k = 0; k < 4; k++) begin : g_l3
    cbfly u_bf (.a(e[k]), .b(ow[k]), .x(r8[k]), .y(r8[k+4]));
  end

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      if (!radix2)     y[k] = r8[k];
      else if (k % 2 == 1) y[k] = l1y[k/2];
      else             y[k] = l1x[k/2];
    end
  end

  logic unused;
  assign unused = ^w[0];
endmodule
