// tb_twiddle_rom: self-checking test of the twiddle factor table.
//
// Every entry of the 128-entry table is compared with cos(2*pi*k/N) and
// -sin(2*pi*k/N) from the simulator's math functions; the five-digit sample
// values of the 64-point table (W64^k = W128^(2k)) and the exact quarter points
// are checked, as is the mode tag.
module tb_twiddle_rom;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 128;
  logic [6:0] k;
  logic [2:0] mode;
  cmpfp_t     w;
  int checks = 0, failures = 0;

  twiddle_rom #(.N(N)) dut (.k, .mode, .w);

  // Five-digit samples W64^0..W64^4: real, imaginary.
  real samp [5][2] = '{'{1.0, 0.0}, '{0.99518, -0.09802}, '{0.98079, -0.19509},
                       '{0.95694, -0.29028}, '{0.92388, -0.38268}};

  initial begin
    for (int i = 0; i < N; i++) begin
      k = 7'(i);
      mode = 3'(i % 6);
      #1;
      checks++;
      if (absr(to_r(w.re) - $cos(2.0 * 3.141592653589793 * i / N)) > 1.0e-15 ||
          absr(to_r(w.im) + $sin(2.0 * 3.141592653589793 * i / N)) > 1.0e-15 ||
          w.re.mode !== mode || w.im.mode !== mode) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d got %g, %g j", i, to_r(w.re), to_r(w.im));
      end
    end
    for (int i = 0; i < 5; i++) begin
      k = 7'(2 * i);
      #1;
      checks++;
      if (absr(to_r(w.re) - samp[i][0]) > 1.0e-5 || absr(to_r(w.im) - samp[i][1]) > 1.0e-5) begin
        failures++;
        $display("FAIL W64^%0d got %g, %g j", i, to_r(w.re), to_r(w.im));
      end
    end
    k = 7'd32; #1; checks++;
    if (to_r(w.re) != 0.0 || to_r(w.im) != -1.0) begin failures++; $display("FAIL W^32"); end
    k = 7'd64; #1; checks++;
    if (to_r(w.re) != -1.0 || to_r(w.im) != 0.0) begin failures++; $display("FAIL W^64"); end
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
