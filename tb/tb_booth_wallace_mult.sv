// tb_booth_wallace_mult: self-checking test of booth_wallace_mult at W = 53.
//
// Drives corner operands (zero, one, all ones, single bits) and random operands
// and compares the product with the simulator's own wide multiplication.
module tb_booth_wallace_mult;
  localparam int W = 53;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p, exp_p;
  int checks = 0, failures = 0;

  booth_wallace_mult #(.W(W)) dut (.a, .b, .p);

  task automatic check();
    #1;
    exp_p = (2*W)'(a) * (2*W)'(b);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h p=%h expected %h", a, b, p, exp_p);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom} ;
  endfunction

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = 1;  b = '1; check();
    a = '1; b = 0;  check();
    for (int i = 0; i < W; i++) begin
      a = W'(1) << i; b = '1 >> (i % 7); check();
    end
    for (int i = 0; i < 3000; i++) begin
      a = rnd(); b = rnd();
      if (i % 5 == 0) a = a >> ($urandom % W);
      check();
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
