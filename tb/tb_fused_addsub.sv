// tb_fused_addsub: self-checking test of the fused add-subtract unit.
//
// For random operands in every mode the sum X and the difference Y (or B - A when
// op = 1) are compared with the simulator's real arithmetic on the cut operands,
// and X/Y must also match two separate fp_addsub units bit for bit.
module tb_fused_addsub;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  mpfp_t a, b, x, y, rx, ry, rby;
  logic  op;
  int checks = 0, failures = 0;

  fused_addsub dut (.a, .b, .op, .x, .y);
  fp_addsub ref_x (.a, .b, .sub(1'b0), .y(rx));
  fp_addsub ref_y (.a, .b, .sub(1'b1), .y(ry));
  fp_addsub ref_by (.a(b), .b(a), .sub(1'b1), .y(rby));

  task automatic check();
    mpfp_t ops [] = '{a, b};
    logic [2:0] m;
    real wx, wy;
    #1;
    m  = tb_mode(ops, 2);
    wx = cut_r(a, m) + cut_r(b, m);
    wy = op ? cut_r(b, m) - cut_r(a, m) : cut_r(a, m) - cut_r(b, m);
    checks++;
    if (!near(to_r(x), wx, tb_bits(m), 0.0) || !near(to_r(y), wy, tb_bits(m), 0.0)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h op=%0b x=%g (%g) y=%g (%g)", a, b, op,
                                  to_r(x), wx, to_r(y), wy);
    end
    checks++;
    if (x !== rx || y !== (op ? rby : ry)) begin
      failures++;
      if (failures < 10) $display("FAIL vs separate units a=%h b=%h op=%0b", a, b, op);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a  = rnd_fp(3'($urandom_range(0, 5)), (i % 2) ? 2 : 60);
      b  = rnd_fp(3'($urandom_range(0, 5)), (i % 2) ? 2 : 60);
      op = 1'($urandom);
      check();
    end
    a = from_r(5.0, 5); b = from_r(5.0, 5); op = 0; check();
    a = from_r(5.0, 5); b = from_r(5.0, 5); op = 1; check();
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
