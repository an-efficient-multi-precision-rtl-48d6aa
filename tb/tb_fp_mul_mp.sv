// tb_fp_mul_mp: self-checking test of the six-mode floating-point multiplier.
//
// Two instances are checked side by side, one with the Karatsuba-Urdhva and one
// with the Booth-Wallace significand multiplier. Each random product is compared
// bit for bit with an integer reference (significands cut to the mode's width,
// exact product, truncation) and against the simulator's real product within the
// mode's precision. Covered: every mode code, mixed operand tags, the auto mode
// choice for short and long mantissas, overflow, underflow, zero, infinity, NaN.
module tb_fp_mul_mp;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  mpfp_t a, b, yk, yb, e;
  int checks = 0, failures = 0;

  fp_mul_mp #(.MULT(MM_KARATSUBA_URDHVA)) dut_k (.a, .b, .y(yk));
  fp_mul_mp #(.MULT(MM_BOOTH_WALLACE))    dut_b (.a, .b, .y(yb));

  function automatic mpfp_t ref_mul(mpfp_t x, mpfp_t y);
    mpfp_t ops [] = '{x, y};
    logic [2:0] m;
    logic [52:0] sx, sy;
    logic [105:0] p;
    int ex;
    logic [51:0] f;
    logic s;
    m = tb_mode(ops, 2);
    s = x.sign ^ y.sign;
    if ((x.exp == 2047 && x.man != 0) || (y.exp == 2047 && y.man != 0) ||
        (x.exp == 2047 && y.exp == 0) || (x.exp == 0 && y.exp == 2047))
      return {m, 1'b0, 11'h7FF, 1'b1, 51'b0};
    if (x.exp == 2047 || y.exp == 2047) return {m, s, 11'h7FF, 52'b0};
    if (x.exp == 0 || y.exp == 0) return {m, s, 63'b0};
    sx = {1'b1, x.man & tb_mask(tb_bits(m))};
    sy = {1'b1, y.man & tb_mask(tb_bits(m))};
    p  = 106'(sx) * 106'(sy);
    ex = int'(x.exp) + int'(y.exp) - 1023;
    if (p[105]) begin
      f = p[104:53];
      ex++;
    end else f = p[103:52];
    if (ex >= 2047) return {m, s, 11'h7FF, 52'b0};
    if (ex <= 0) return {m, s, 63'b0};
    return {m, s, 11'(ex), f & tb_mask(tb_bits(m))};
  endfunction

  task automatic check(string what);
    mpfp_t ops [] = '{a, b};
    #1;
    e = ref_mul(a, b);
    checks++;
    if (yk !== e || yb !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got %h / %h expected %h", what, a, b, yk, yb, e);
    end
    // independent plausibility check against real arithmetic
    if (e.exp != 0 && e.exp != 2047) begin
      checks++;
      if (!near(to_r(yk), cut_r(a, tb_mode(ops, 2)) * cut_r(b, tb_mode(ops, 2)),
                tb_bits(yk.mode), 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL %s (real) a=%h b=%h got %h", what, a, b, yk);
      end
    end
  endtask

  initial begin
    // random operands in every mode code, also mixed tags
    for (int m = 0; m < 8; m++) begin
      for (int i = 0; i < 300; i++) begin
        a = rnd_fp(3'(m), 200);
        b = rnd_fp((i % 3 == 0) ? 3'($urandom_range(0, 5)) : 3'(m), 200);
        check("random");
      end
    end
    // auto mode: short mantissas pick the narrow modes
    a = from_r(1.5, 0);  b = from_r(-2.25, 0);  check("auto short");
    if (yk.mode !== 3'd1 || to_r(yk) != -3.375) begin failures++; $display("FAIL auto 8-bit"); end
    checks++;
    a = from_r(1.0 + 2.0**-12, 0); b = from_r(3.0, 0); check("auto 16");
    if (yk.mode !== 3'd2) begin failures++; $display("FAIL auto 16-bit mode %0d", yk.mode); end
    checks++;
    a = from_r(1.0 + 2.0**-20, 0); b = from_r(3.0, 0); check("auto 23");
    if (yk.mode !== 3'd3) begin failures++; $display("FAIL auto 23-bit mode %0d", yk.mode); end
    checks++;
    a = from_r(1.0 + 2.0**-40, 0); b = from_r(3.0, 0); check("auto 52");
    if (yk.mode !== 3'd5) begin failures++; $display("FAIL auto 52-bit mode %0d", yk.mode); end
    checks++;
    // narrow mode really drops bits
    a = from_r(1.0 + 2.0**-10, 1); b = from_r(1.0, 1); check("mode2 cut");
    if (to_r(yk) != 1.0) begin failures++; $display("FAIL mode2 cut"); end
    checks++;
    // range limits and special values
    a = from_r(1.0e300, 5); b = from_r(1.0e300, 5);   check("overflow");
    a = from_r(1.0e-300, 5); b = from_r(1.0e-300, 5); check("underflow");
    a = from_r(0.0, 5); b = from_r(-7.0, 5);          check("zero");
    a = {3'd5, 1'b0, 11'h7FF, 52'd0}; b = from_r(-2.0, 5); check("inf");
    a = {3'd5, 1'b0, 11'h7FF, 52'd0}; b = from_r(0.0, 5);  check("inf*0");
    a = {3'd5, 1'b1, 11'h7FF, 52'd5}; b = from_r(3.0, 5);  check("nan");
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
