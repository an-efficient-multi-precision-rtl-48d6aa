// tb_radix8_pe: self-checking test of the mixed radix-2/radix-8 processing element.
//
// Radix-8: random inputs and random unit-circle twiddles; the eight outputs must
// equal sum_m x_m w_m W8^(mk) (w_0 = 1) computed in real arithmetic. Radix-2: the
// outputs must be the sums and differences of the adjacent input pairs. Both are
// run in mode 6 (52-bit mantissas) and mode 2 (8-bit mantissas) with tolerances
// scaled to the mode.
module tb_radix8_pe;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  localparam real PI = 3.141592653589793;

  logic       radix2;
  logic [2:0] mode;
  cmpfp_t     x [8], w [8], y [8];
  int checks = 0, failures = 0;

  radix8_pe dut (.radix2, .mode, .x, .w, .y);

  task automatic run(logic r2, logic [2:0] m);
    real xr [8], xi [8], tr [8], ti [8], er, ei, scale, tol;
    real ang;
    radix2 = r2;
    mode = m;
    scale = 0.0;
    for (int i = 0; i < 8; i++) begin
      x[i].re = rnd_fp(m, 3);
      x[i].im = rnd_fp(m, 3);
      ang = 2.0 * PI * $urandom_range(0, 999) / 1000.0;
      w[i].re = from_r($cos(ang), m);
      w[i].im = from_r(-$sin(ang), m);
      xr[i] = cut_r(x[i].re, m);
      xi[i] = cut_r(x[i].im, m);
      scale = scale + absr(xr[i]) + absr(xi[i]);
    end
    #1;
    tol = scale * 16.0 * (2.0 ** (-tb_bits(m)));
    if (r2) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (absr(to_r(y[2*i].re) - (xr[2*i] + xr[2*i+1])) > tol ||
            absr(to_r(y[2*i].im) - (xi[2*i] + xi[2*i+1])) > tol ||
            absr(to_r(y[2*i+1].re) - (xr[2*i] - xr[2*i+1])) > tol ||
            absr(to_r(y[2*i+1].im) - (xi[2*i] - xi[2*i+1])) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL radix-2 pair %0d", i);
        end
      end
    end else begin
      for (int i = 0; i < 8; i++) begin
        real c, d;
        c = (i == 0) ? 1.0 : cut_r(w[i].re, m);
        d = (i == 0) ? 0.0 : cut_r(w[i].im, m);
        tr[i] = xr[i] * c - xi[i] * d;
        ti[i] = xr[i] * d + xi[i] * c;
      end
      for (int k = 0; k < 8; k++) begin
        er = 0.0; ei = 0.0;
        for (int i = 0; i < 8; i++) begin
          er += tr[i] * $cos(2.0 * PI * i * k / 8.0) + ti[i] * $sin(2.0 * PI * i * k / 8.0);
          ei += ti[i] * $cos(2.0 * PI * i * k / 8.0) - tr[i] * $sin(2.0 * PI * i * k / 8.0);
        end
        checks++;
        if (absr(to_r(y[k].re) - er) > tol || absr(to_r(y[k].im) - ei) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL radix-8 mode %0d X%0d: got %g, %g j want %g, %g j",
                                      m, k, to_r(y[k].re), to_r(y[k].im), er, ei);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 100; i++) begin
      run(1'b0, 3'd5);
      run(1'b1, 3'd5);
      run(1'b0, 3'd1);
      run(1'b1, 3'd1);
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
