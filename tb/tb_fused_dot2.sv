// tb_fused_dot2: self-checking test of the fused dot-product unit Y = AB +- CD.
//
// Random operands in every mode are checked against the simulator's real
// arithmetic on the cut operands (with an allowance for the rounding of the two
// real products). Exact cases show the single rounding: AB - CD where the
// difference lies far below the precision of either product is returned exactly,
// which two rounded products followed by a subtraction would lose.
module tb_fused_dot2;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  mpfp_t a, b, c, d, y;
  logic  op;
  int checks = 0, failures = 0;

  fused_dot2 dut (.a, .b, .c, .d, .op, .y);

  task automatic check_rand();
    mpfp_t ops [] = '{a, b, c, d};
    logic [2:0] m;
    real p1, p2, want;
    #1;
    m  = tb_mode(ops, 4);
    p1 = cut_r(a, m) * cut_r(b, m);
    p2 = cut_r(c, m) * cut_r(d, m);
    want = op ? p1 - p2 : p1 + p2;
    checks++;
    if (!near(to_r(y), want, tb_bits(m), (absr(p1) + absr(p2)) * 2.0**-51) || y.mode !== m) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0b got %g want %g", op, to_r(y), want);
    end
  endtask

  task automatic check_exact(real want, string what);
    #1;
    checks++;
    if (to_r(y) != want) begin
      failures++;
      $display("FAIL %s: got %h (%g) want %g", what, y, to_r(y), want);
    end
  endtask

  initial begin
    for (int i = 0; i < 1500; i++) begin
      a = rnd_fp(3'($urandom_range(0, 5)), 20);
      b = rnd_fp(a.mode, 20);
      c = rnd_fp(a.mode, 20);
      d = rnd_fp(a.mode, 20);
      op = 1'($urandom);
      check_rand();
    end
    // (1+2^-30)^2 - 1*(1+2^-29) = 2^-60 exactly
    a = from_r(1.0 + 2.0**-30, 5); b = a; c = from_r(1.0, 5); d = from_r(1.0 + 2.0**-29, 5);
    op = 1'b1; check_exact(2.0**-60, "single rounding");
    op = 1'b0; check_exact(2.0 + 2.0**-28, "sum");
    a = from_r(3.0, 5); b = from_r(4.0, 5); c = from_r(2.0, 5); d = from_r(6.0, 5);
    op = 1'b1; check_exact(0.0, "cancel to zero");
    op = 1'b0; check_exact(24.0, "3*4+2*6");
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
