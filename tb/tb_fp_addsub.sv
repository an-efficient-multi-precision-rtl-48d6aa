// tb_fp_addsub: self-checking test of the multi-precision adder/subtractor.
//
// Random sums and differences in every mode, with exponent spreads that make the
// alignment shift small (cancellation) and large (sticky bits), are compared with
// the simulator's real arithmetic on the operands cut to the mode's width; the
// result tag must equal the mode the reference rule picks. Exact cases (x - x,
// 1 + 1, sums that carry into a new exponent) and special values are checked bit
// for bit.
module tb_fp_addsub;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  mpfp_t a, b, y;
  logic  sub;
  int checks = 0, failures = 0;

  fp_addsub dut (.a, .b, .sub, .y);

  task automatic check_rand();
    mpfp_t ops [] = '{a, b};
    logic [2:0] m;
    real want;
    #1;
    m = tb_mode(ops, 2);
    want = sub ? cut_r(a, m) - cut_r(b, m) : cut_r(a, m) + cut_r(b, m);
    checks++;
    if (!near(to_r(y), want, tb_bits(m), 0.0) || y.mode !== m) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h sub=%0b got %h (%g) want %g mode %0d",
                                  a, b, sub, y, to_r(y), want, m);
    end
  endtask

  task automatic check_exact(mpfp_t want, string what);
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h want %h", what, a, b, y, want);
    end
  endtask

  initial begin
    for (int m = 0; m < 6; m++) begin
      for (int i = 0; i < 400; i++) begin
        a = rnd_fp(3'(m), (i % 2) ? 2 : 70);
        b = rnd_fp((i % 4 == 0) ? 3'($urandom_range(0, 5)) : 3'(m), (i % 2) ? 2 : 70);
        sub = 1'($urandom);
        check_rand();
      end
    end
    // near-total cancellation
    for (int i = 0; i < 200; i++) begin
      a = rnd_fp(5, 3);
      b = a;
      b.man = b.man ^ 52'($urandom_range(0, 255));
      sub = 1'b1;
      check_rand();
    end
    sub = 1'b1; a = from_r(3.25, 5); b = from_r(3.25, 5); check_exact(mk_zero(5, 0), "x-x");
    sub = 1'b0; a = from_r(1.0, 5);  b = from_r(1.0, 5);  check_exact(from_r(2.0, 5), "1+1");
    sub = 1'b0; a = from_r(1.75, 1); b = from_r(1.5, 1);  check_exact(from_r(3.25, 1), "carry");
    sub = 1'b1; a = from_r(1.0, 5);  b = from_r(2.0**-60, 5);
    check_exact(from_r(1.0 - 2.0**-53, 5), "truncating borrow");
    sub = 1'b0; a = from_r(1.0, 5);  b = from_r(-0.0, 5); check_exact(from_r(1.0, 5), "zero operand");
    sub = 1'b0; a = from_r(1.5e308, 5); b = from_r(1.5e308, 5); check_exact(mk_inf(5, 0), "overflow");
    sub = 1'b1; a = mk_inf(5, 0); b = mk_inf(5, 0); check_exact(mk_nan(5), "inf-inf");
    sub = 1'b1; a = from_r(2.0, 5); b = mk_inf(5, 0); check_exact(mk_inf(5, 1), "2-inf");
    // auto mode: the result tag follows the longest operand mantissa
    sub = 1'b0; a = from_r(1.5, 0); b = from_r(1.0 + 2.0**-15, 0);
    check_exact(from_r(2.5 + 2.0**-15, 2), "auto");
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
