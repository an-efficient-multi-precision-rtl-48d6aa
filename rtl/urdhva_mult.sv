// urdhva_mult: unsigned W x W multiplier built the "vertically and crosswise"
// (Urdhva Tiryagbhyam) way.
//
// Column k of the product collects every bit product a[i]&b[j] with i+j = k (the
// vertical and crosswise pairs), adds the carry handed on from column k-1, keeps
// the low bit as product bit k and passes the rest on as the next carry. The
// columns are thus summed in a ripple from the least significant end, which is the
// small, low-power form the document recommends for short operands.
//
// Interface: a, b (W bits, unsigned) -> p (2W bits). Purely combinational.
// The column scheme is the document's; the carry width and loop form are this
// design's.
module urdhva_mult #(
  parameter int W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int CW = $clog2(2 * W + 2) + 1;   // column sum / carry width

  always_comb begin
    logic [CW-1:0] carry;
    logic [CW-1:0] col;
    carry = '0;
    p = '0;
    for (int k = 0; k < 2 * W; k++) begin
      col = carry;
      for (int i = 0; i < W; i++) begin
        if (k - i >= 0 && k - i < W) col = col + CW'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
  end
endmodule
