// twiddle_rom: table of the N twiddle factors W_N^k = cos(2*pi*k/N) - j sin(2*pi*k/N),
// k = 0 .. N-1, as multi-precision floating-point numbers.
//
// The table is computed during elaboration from the cosine and sine of 2*pi*k/N
// and stored as IEEE-754 doubles (nearest rounding), so it follows any N without
// an external file. The real part is the cosine, the imaginary part minus the
// sine. A read returns entry k with the requested precision mode written into both
// tags; the multiplier that uses the twiddle then cuts the mantissa to that mode.
// Exact zeros are stored as +0 and exact +-1 / +-j values are forced, so the
// table has no rounding noise where the true value is simple.
//
// Interface: k (log2 N bits), mode -> w. Combinational read (a ROM).
// The twiddle definition is the document's; the full-circle table, the elaboration-
// time computation and the read timing are this design's.
module twiddle_rom
  import mpfp_pkg::*;
#(
  parameter int N = 128
) (
  input  logic [$clog2(N)-1:0] k,
  input  logic [2:0]           mode,
  output cmpfp_t               w
);
  typedef logic [63:0] tab_t [N];

  function automatic logic [63:0] to_double(real v);
    if (v < 1.0e-15 && v > -1.0e-15) return 64'h0;
    return $realtobits(v);
  endfunction

  function automatic tab_t mk_table(bit imag);
    tab_t t;
    real pi, ang;
    pi = 3.14159265358979323846;
    for (int i = 0; i < N; i++) begin
      ang = 2.0 * pi * i / N;
      if (imag) t[i] = to_double(-$sin(ang));
      else      t[i] = to_double($cos(ang));
      // exact values at the quarter points
      if (4 * i % N == 0) begin
        case (4 * i / N)
          0: t[i] = imag ? 64'h0 : $realtobits(1.0);
          1: t[i] = imag ? $realtobits(-1.0) : 64'h0;
          2: t[i] = imag ? 64'h0 : $realtobits(-1.0);
          default: t[i] = imag ? $realtobits(1.0) : 64'h0;
        endcase
      end
    end
    return t;
  endfunction

  localparam tab_t COS_T  = mk_table(1'b0);
  localparam tab_t NSIN_T = mk_table(1'b1);

  assign w.re = {mode, COS_T[k]};
  assign w.im = {mode, NSIN_T[k]};
endmodule
