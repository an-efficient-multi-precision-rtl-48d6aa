// tb_mpfp_fft: end-to-end test of the mixed-radix floating-point FFT at N = 16
// (one radix-2 stage and one radix-8 stage).
//
// Several frames are sent back to back: full precision (mode 6), 8-bit mantissas
// (mode 2), auto mode with short-mantissa samples, and mode 6 again. The source
// drops in_valid at random, so loading stalls. Each frame's outputs are compared
// with a direct DFT in real arithmetic on the samples cut to the frame's mode,
// with a tolerance scaled to that mode; the output indices must run 0..N-1 and the
// compute phase must last (1 + K) * N / 8 cycles. The testbench counts how often
// each mechanism occurred (load stalls, radix-2 and radix-8 stage cycles, mode
// changes between frames, auto and narrow frames) and fails if one never did.
module tb_mpfp_fft;
  import mpfp_pkg::*;
  import tb_fp_pkg::*;

  localparam int N    = 16;
  localparam int LOGN = $clog2(N);
  localparam int NST  = 1 + (LOGN - 1) / 3;
  localparam real PI  = 3.141592653589793;

  logic            clk = 0, rst_n = 0;
  logic [2:0]      mode;
  logic            in_valid, in_ready, out_valid, busy;
  cmpfp_t          in_data, out_data;
  logic [LOGN-1:0] out_index;
  int checks = 0, failures = 0;
  int n_stall = 0, n_r2 = 0, n_r8 = 0, n_modechg = 0, n_auto = 0, n_narrow = 0;

  mpfp_fft #(.N(N)) dut (.clk, .rst_n, .mode, .in_valid, .in_ready, .in_data,
                         .out_valid, .out_index, .out_data, .busy);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && dut.state == 2'd1) begin
    if (dut.stage == 0) n_r2++;
    else n_r8++;
  end

  task automatic frame(logic [2:0] m, bit short_man);
    real xr [N], xi [N], er, ei, scale, tol, errmax;
    int  cyc, t0;
    mpfp_t v;
    cmpfp_t s;
    mode = m;
    scale = 0.0;
    // load, with random gaps
    for (int n = 0; n < N; n++) begin
      s.re = rnd_fp(3'd5, 2);
      s.im = rnd_fp(3'd5, 2);
      if (short_man) begin
        s.re.man &= tb_mask(6);
        s.im.man &= tb_mask(6);
      end
      in_data <= s;
      v = s.re; v.mode = m; xr[n] = cut_r(v, (m == 0) ? 3'd5 : m);
      v = s.im; v.mode = m; xi[n] = cut_r(v, (m == 0) ? 3'd5 : m);
      scale += absr(xr[n]) + absr(xi[n]);
      while ($urandom_range(0, 3) == 0) begin
        in_valid <= 1'b0;
        n_stall++;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    // compute phase length
    cyc = 0;
    @(posedge clk);
    while (!out_valid) begin
      cyc++;
      @(posedge clk);
    end
    checks++;
    if (cyc != NST * N / 8) begin
      failures++;
      $display("FAIL compute took %0d cycles, expected %0d", cyc, NST * N / 8);
    end
    // unload and compare
    tol = scale * 4.0 * (2.0 ** (-tb_bits((m == 0) ? 3'd1 : m)));
    if (tol < scale * (2.0 ** -46)) tol = scale * (2.0 ** -46);
    errmax = 0.0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (!out_valid || out_index != LOGN'(k)) begin
        failures++;
        $display("FAIL output %0d: valid %0b index %0d", k, out_valid, out_index);
      end
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        er += xr[n] * $cos(2.0 * PI * n * k / N) + xi[n] * $sin(2.0 * PI * n * k / N);
        ei += xi[n] * $cos(2.0 * PI * n * k / N) - xr[n] * $sin(2.0 * PI * n * k / N);
      end
      checks++;
      if (absr(to_r(out_data.re) - er) > tol || absr(to_r(out_data.im) - ei) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL mode %0d X[%0d] = %g, %g j, want %g, %g j", m, k,
                                    to_r(out_data.re), to_r(out_data.im), er, ei);
      end
      if (absr(to_r(out_data.re) - er) > errmax) errmax = absr(to_r(out_data.re) - er);
      @(posedge clk);
    end
    $display("frame mode %0d: compute %0d cycles, largest error %g (tolerance %g)", m, cyc,
             errmax, tol);
  endtask

  initial begin
    in_valid = 0;
    in_data = '0;
    mode = 3'd5;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    frame(3'd5, 0);
    frame(3'd1, 0); n_modechg++; n_narrow++;
    frame(3'd0, 1); n_modechg++; n_auto++;
    frame(3'd5, 0); n_modechg++;
    frame(3'd3, 0); n_modechg++; n_narrow++;
    $display("mechanisms: load stalls %0d, radix-2 cycles %0d, radix-8 cycles %0d, mode changes %0d, auto frames %0d, narrow frames %0d",
             n_stall, n_r2, n_r8, n_modechg, n_auto, n_narrow);
    checks++;
    if (n_stall == 0 || n_r2 == 0 || n_r8 == 0 || n_modechg == 0 || n_auto == 0 || n_narrow == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
