// mpfp_fft: N-point (default 128) mixed radix-2/radix-8 decimation-in-time FFT on
// multi-precision floating-point complex samples; the top of the design.
//
// Memory-based architecture: one processing element (radix8_pe) and one sample
// memory of N complex words. A frame goes through three phases:
//   LOAD     N samples are accepted (valid/ready) and written at their
//            digit-reversed address; each sample's mode tag is replaced by the
//            'mode' input, which thus sets the precision of the whole transform.
//   COMPUTE  N = 2 * 8^K is factored as one radix-2 stage followed by K radix-8
//            stages. Each cycle the PE reads eight words, transforms them and
//            writes them back in place: four radix-2 butterflies in stage 0,
//            one radix-8 butterfly in the later stages, so every stage takes N/8
//            cycles. In radix-8 stage s the butterfly b has span Lp = 2*8^(s-1),
//            group g = b / Lp, offset j = b mod Lp; it works on addresses
//            g*8*Lp + j + m*Lp (m = 0..7) with twiddles W_N^(j*m*N/(8*Lp)).
//   UNLOAD   the N results leave in natural order, one per cycle, with their index.
// Input reordering: sample n = t*(N/2) + u (t one bit, u < N/2 written in base-8
// digits u_0..u_(K-1)) goes to address t + 2 * (u with its base-8 digits reversed).
//
// Timing: a frame takes N load cycles (if the source never stalls), (1+K)*N/8
// compute cycles (48 for N = 128) and N unload cycles; the unload output has no
// back-pressure. The PE is combinational between memory read and write.
// Interface: clk, rst_n (active low, synchronous), mode; in_valid/in_ready/in_data;
// out_valid/out_index/out_data; busy.
// DIT, the 128 points, the radix-2 plus radix-8 split and the memory-based
// architecture (one processing element plus memory) follow the document; the stage
// order, addressing, handshakes and phase timing are this design's.
module mpfp_fft
  import mpfp_pkg::*;
#(
  parameter int           N      = 128,
  parameter cmul_method_e METHOD = CM_GOLUB,
  parameter mant_mult_e   MULT   = MM_KARATSUBA_URDHVA
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           mode,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cmpfp_t               in_data,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_index,
  output cmpfp_t               out_data,
  output logic                 busy
);
  localparam int LOGN   = $clog2(N);
  localparam int K      = (LOGN - 1) / 3;      // number of radix-8 stages
  localparam int NST    = K + 1;               // stages in all
  localparam int BPS    = N / 8;               // PE calls per stage
  localparam int STW    = $clog2(NST + 1);

  typedef logic [LOGN-1:0] addr_t;
  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_UNLOAD} state_e;

  initial begin
    assert (N == 2 * (8 ** K) && N >= 16)
      else $fatal(1, "mpfp_fft: N must be 2 * 8^K with K >= 1");
  end

  state_e            state;
  addr_t             cnt;          // load / unload counter
  logic [STW-1:0]    stage;
  logic [LOGN-4:0]   bcnt;         // PE call within the stage
  logic [2:0]        mode_r;       // mode of the frame being processed
  cmpfp_t            mem [N];

  addr_t             addr [8];
  addr_t             twk  [8];
  cmpfp_t            pe_x [8], pe_w [8], pe_y [8];
  logic              radix2;

  // Digit-reversed load address.
  function automatic addr_t load_addr(addr_t n);
    addr_t r;
    r = addr_t'(n[LOGN-1]);
    for (int i = 0; i < K; i++)
      r = r | (((n >> (3 * i)) & addr_t'(7)) << (1 + 3 * (K - 1 - i)));
    return r;
  endfunction

  // Addresses and twiddle indices of the current PE call.
  always_comb begin
    int   sh;           // log2 of the span Lp
    addr_t g, j;
    radix2 = (stage == 0);
    sh = 1 + 3 * (int'(stage) - 1);
    if (sh < 1) sh = 1;
    g = addr_t'(bcnt) >> sh;
    j = addr_t'(bcnt) & addr_t'((1 << sh) - 1);
    for (int m = 0; m < 8; m++) begin
      if (radix2) begin
        addr[m] = addr_t'({bcnt, 3'(m)});
        twk[m]  = '0;
      end else begin
        addr[m] = (g << (sh + 3)) + j + (addr_t'(m) << sh);
        twk[m]  = addr_t'((j * addr_t'(m)) << (LOGN - sh - 3));
      end
    end
  end

  for (genvar m = 0; m < 8; m++) begin : g_rd
    assign pe_x[m] = mem[addr[m]];
    if (m == 0) begin : g_w0
      assign pe_w[m] = '0;
    end else begin : g_rom
      twiddle_rom #(.N(N)) u_rom (.k(twk[m]), .mode(mode_r), .w(pe_w[m]));
    end
  end

  radix8_pe #(.METHOD(METHOD), .MULT(MULT)) u_pe (
    .radix2, .mode(mode_r), .x(pe_x), .w(pe_w), .y(pe_y)
  );

  // Control.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      cnt    <= '0;
      stage  <= '0;
      bcnt   <= '0;
      mode_r <= MODE6;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == '0) mode_r <= mode;
          cnt <= cnt + 1'b1;
          if (cnt == addr_t'(N - 1)) begin
            state <= S_COMPUTE;
            stage <= '0;
            bcnt  <= '0;
          end
        end
        S_COMPUTE: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == (LOGN-3)'(BPS - 1)) begin
            if (stage == STW'(NST - 1)) begin
              state <= S_UNLOAD;
              cnt   <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        default: begin
          cnt <= cnt + 1'b1;
          if (cnt == addr_t'(N - 1)) state <= S_LOAD;
        end
      endcase
    end
  end

  // Sample memory: one write per cycle while loading, eight while computing.
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem[load_addr(cnt)] <= '{re: '{mode: mode, sign: in_data.re.sign, exp: in_data.re.exp,
                                     man: in_data.re.man},
                               im: '{mode: mode, sign: in_data.im.sign, exp: in_data.im.exp,
                                     man: in_data.im.man}};
    end else if (state == S_COMPUTE) begin
      for (int m = 0; m < 8; m++) mem[addr[m]] <= pe_y[m];
    end
  end

  assign in_ready  = (state == S_LOAD);
  assign busy      = (state != S_LOAD);
  assign out_valid = (state == S_UNLOAD);
  assign out_index = cnt;
  assign out_data  = mem[cnt];

  // The eight addresses of one PE call never collide.
  always_ff @(posedge clk) begin
    if (rst_n && state == S_COMPUTE) begin
      for (int a = 0; a < 8; a++)
        for (int b = a + 1; b < 8; b++)
          assert (addr[a] != addr[b]) else $error("mpfp_fft: PE address collision");
    end
  end
endmodule
