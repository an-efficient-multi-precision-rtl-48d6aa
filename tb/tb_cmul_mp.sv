// tb_cmul_mp: self-checking test of the complex (twiddle) multiplier in all four
// structures (conventional, Golub, two fused dot products, three-term fused) and
// with the Booth-Wallace significand multiplier.
//
// Random data and twiddle values in every mode are compared with the complex
// product in real arithmetic, allowing for the intermediate rounding each
// structure has at the mode's width; integer cases must come out exact.
module tb_cmul_mp;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  cmpfp_t x, w;
  cmpfp_t y [5];
  int checks = 0, failures = 0;

  cmul_mp #(.METHOD(CM_CONVENTIONAL)) dut_conv (.x, .w, .y(y[0]));
  cmul_mp #(.METHOD(CM_GOLUB))        dut_gol  (.x, .w, .y(y[1]));
  cmul_mp #(.METHOD(CM_FUSED_DOT))    dut_dot  (.x, .w, .y(y[2]));
  cmul_mp #(.METHOD(CM_FUSED_3TERM))  dut_dot3 (.x, .w, .y(y[3]));
  cmul_mp #(.METHOD(CM_GOLUB), .MULT(MM_BOOTH_WALLACE)) dut_bw (.x, .w, .y(y[4]));

  task automatic check_rand(logic [2:0] m);
    real a, b, c, d, wr, wi, slack;
    int bits;
    #1;
    bits = tb_bits(m);
    a = cut_r(x.re, m); b = cut_r(x.im, m); c = cut_r(w.re, m); d = cut_r(w.im, m);
    wr = a * c - b * d;
    wi = b * c + a * d;
    slack = 16.0 * (2.0 ** (-bits)) * (absr(a) + absr(b)) * (absr(c) + absr(d));
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (!near(to_r(y[i].re), wr, bits, slack) || !near(to_r(y[i].im), wi, bits, slack)) begin
        failures++;
        if (failures < 10) $display("FAIL method %0d mode %0d: got %g, %g j want %g, %g j", i, m,
                                    to_r(y[i].re), to_r(y[i].im), wr, wi);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 600; i++) begin
      logic [2:0] m;
      m = 3'($urandom_range(1, 5));
      x.re = rnd_fp(m, 8); x.im = rnd_fp(m, 8); w.re = rnd_fp(m, 8); w.im = rnd_fp(m, 8);
      check_rand(m);
    end
    // (2 + 3j)(5 + 7j) = -11 + 29j, exact in every structure
    x.re = from_r(2.0, 0); x.im = from_r(3.0, 0); w.re = from_r(5.0, 0); w.im = from_r(7.0, 0);
    #1;
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (to_r(y[i].re) != -11.0 || to_r(y[i].im) != 29.0 || y[i].re.mode !== 3'd1) begin
        failures++;
        $display("FAIL exact method %0d: %g, %g j mode %0d", i, to_r(y[i].re), to_r(y[i].im),
                 y[i].re.mode);
      end
    end
    // multiplication by the twiddle -j
    x.re = from_r(1.25, 5); x.im = from_r(-0.5, 5); w.re = from_r(0.0, 5); w.im = from_r(-1.0, 5);
    #1;
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (to_r(y[i].re) != -0.5 || to_r(y[i].im) != -1.25) begin
        failures++;
        $display("FAIL -j method %0d: %g, %g j", i, to_r(y[i].re), to_r(y[i].im));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
