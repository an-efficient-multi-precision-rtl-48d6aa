// tb_fused_dot3: self-checking test of the three-term fused dot-product unit,
// X = AB +- CD and Y = CD +- EF.
//
// Random operands with all four operation codes are checked against real
// arithmetic; exact cases check the single rounding of each output and the use of
// the unit as a Golub complex multiplier.
module tb_fused_dot3;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  mpfp_t a, b, c, d, e, f, x, y;
  logic [1:0] op;
  int checks = 0, failures = 0;

  fused_dot3 dut (.a, .b, .c, .d, .e, .f, .op, .x, .y);

  task automatic check_rand();
    mpfp_t ops [] = '{a, b, c, d, e, f};
    logic [2:0] m;
    real p1, p2, p3, wx, wy;
    #1;
    m  = tb_mode(ops, 6);
    p1 = cut_r(a, m) * cut_r(b, m);
    p2 = cut_r(c, m) * cut_r(d, m);
    p3 = cut_r(e, m) * cut_r(f, m);
    wx = op[0] ? p1 - p2 : p1 + p2;
    wy = op[1] ? p2 - p3 : p2 + p3;
    checks++;
    if (!near(to_r(x), wx, tb_bits(m), (absr(p1) + absr(p2)) * 2.0**-51) ||
        !near(to_r(y), wy, tb_bits(m), (absr(p2) + absr(p3)) * 2.0**-51)) begin
      failures++;
      if (failures < 10) $display("FAIL op=%b x=%g (%g) y=%g (%g)", op, to_r(x), wx, to_r(y), wy);
    end
  endtask

  initial begin
    for (int i = 0; i < 1500; i++) begin
      a = rnd_fp(3'($urandom_range(0, 5)), 20);
      b = rnd_fp(a.mode, 20); c = rnd_fp(a.mode, 20); d = rnd_fp(a.mode, 20);
      e = rnd_fp(a.mode, 20); f = rnd_fp(a.mode, 20);
      op = 2'($urandom);
      check_rand();
    end
    // Golub terms for (2 + 3j)(5 + 7j) = -11 + 29j: a(c-d) + d(a-b), d(a-b) + b(c+d)
    a = from_r(2.0, 5); b = from_r(-2.0, 5); c = from_r(7.0, 5); d = from_r(-1.0, 5);
    e = from_r(3.0, 5); f = from_r(12.0, 5); op = 2'b00;
    #1; checks++;
    if (to_r(x) != -11.0 || to_r(y) != 29.0) begin
      failures++; $display("FAIL golub: %g %g", to_r(x), to_r(y));
    end
    // single rounding on both outputs
    a = from_r(1.0 + 2.0**-30, 5); b = a; c = from_r(1.0, 5); d = from_r(1.0 + 2.0**-29, 5);
    e = from_r(1.0 + 2.0**-30, 5); f = e; op = 2'b11;
    #1; checks++;
    if (to_r(x) != 2.0**-60 || to_r(y) != -(2.0**-60)) begin
      failures++; $display("FAIL fused: %g %g", to_r(x), to_r(y));
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
