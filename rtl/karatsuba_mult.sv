// karatsuba_mult: unsigned W x W multiplier combining Karatsuba with Urdhva
// Tiryagbhyam ("Karatsuba-Urdhva").
//
// Operands wider than BASE_W are split into a high half (W-H bits) and a low half
// (H = W/2 bits): X = Xh*2^H + Xl, Y = Yh*2^H + Yl. Three half-size products are
// formed, z2 = Xh*Yh, z0 = Xl*Yl and z1 = (Xh+Xl)*(Yh+Yl), and the middle term is
// recovered as z1 - z2 - z0, so one multiplication is traded for additions:
//   X*Y = z2*2^(2H) + (z1 - z2 - z0)*2^H + z0.
// The three sub-products use this module again, so the split recurses until the
// operands are BASE_W bits or narrower, where urdhva_mult takes over.
//
// Interface: a, b (W bits, unsigned) -> p (2W bits). Purely combinational.
// The algorithm split and the 16-bit crossover come from the document; the exact
// split point H = W/2 is this design's choice.
// A lint run of this module on its own (Verilator) reports z2, z0 and z1 (and the half
// sums) as undriven and unused: it does not elaborate the self-instantiation when
// linting. Simulation elaborates the recursion, and the products are checked bit
// for bit there, so the warning stands.
module karatsuba_mult #(
  parameter int W      = 53,
  parameter int BASE_W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  if (W <= BASE_W) begin : g_base
    urdhva_mult #(.W(W)) u_base (.a, .b, .p);
  end else begin : g_split
    localparam int H  = W / 2;        // low half width
    localparam int HH = W - H;        // high half width (>= H)
    localparam int MW = HH + 1;       // width of the half sums

    logic [HH-1:0]   ah, bh;
    logic [H-1:0]    al, bl;
    logic [MW-1:0]   as, bs;
    logic [2*HH-1:0] z2;
    logic [2*H-1:0]  z0;
    logic [2*MW-1:0] z1;
    logic [2*MW-1:0] mid;

    assign {ah, al} = a;
    assign {bh, bl} = b;
    assign as = MW'(ah) + MW'(al);
    assign bs = MW'(bh) + MW'(bl);

    karatsuba_mult #(.W(HH), .BASE_W(BASE_W)) u_hi  (.a(ah), .b(bh), .p(z2));
    karatsuba_mult #(.W(H),  .BASE_W(BASE_W)) u_lo  (.a(al), .b(bl), .p(z0));
    karatsuba_mult #(.W(MW), .BASE_W(BASE_W)) u_mid (.a(as), .b(bs), .p(z1));

    assign mid = z1 - (2*MW)'(z2) - (2*MW)'(z0);
    assign p = ((2*W)'(z2) << (2 * H)) + ((2*W)'(mid) << H) + (2*W)'(z0);
  end
endmodule
