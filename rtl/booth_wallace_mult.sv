// booth_wallace_mult: unsigned W x W multiplier with radix-4 (modified) Booth
// encoding and a Wallace tree of carry-save adders.
//
// The multiplier b is zero-extended by one bit so it reads as a positive two's
// complement number and is recoded in overlapping bit triples into digits in
// {-2,-1,0,+1,+2} (the bit-pair recoding table). Each digit selects 0, +-a or +-2a
// as a partial product, shifted by two bits per digit, so only ceil((W+1)/2)
// partial products remain. These rows are reduced three at a time by 3:2
// carry-save adders, level after level, until two rows are left, which one
// final carry-propagate adder sums. All arithmetic is modulo 2^(2W), which is
// exact because the true product fits in 2W bits.
//
// Interface: a, b (W bits, unsigned) -> p (2W bits). Purely combinational.
// The encoding and the tree follow the document; the row bookkeeping is this
// design's.
module booth_wallace_mult #(
  parameter int W = 53
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int PW = 2 * W;              // product / row width
  localparam int ND = (W + 2) / 2;        // number of Booth digits
  localparam int BW = 2 * ND + 1;         // recoded multiplier width incl. b[-1]

  logic [PW-1:0] rows [ND];

  // Booth recoding and partial product selection.
  always_comb begin
    logic [BW-1:0] bx;
    logic [2:0]    tri3;
    logic [PW-1:0] pp;
    bx = {{(BW-W-1){1'b0}}, b, 1'b0};
    for (int d = 0; d < ND; d++) begin
      tri3 = bx[2*d +: 3];
      case (tri3)
        3'b001, 3'b010: pp = PW'(a);                 // +1
        3'b011:         pp = PW'(a) << 1;            // +2
        3'b100:         pp = -(PW'(a) << 1);         // -2
        3'b101, 3'b110: pp = -PW'(a);                // -1
        default:        pp = '0;                     // 0
      endcase
      rows[d] = pp << (2 * d);
    end
  end

  // Wallace reduction: every group of three rows becomes a sum and a carry row.
  always_comb begin
    logic [PW-1:0] cur [ND];
    logic [PW-1:0] nxt [ND];
    int n, m;
    for (int i = 0; i < ND; i++) cur[i] = rows[i];
    n = ND;
    for (int lvl = 0; lvl < ND; lvl++) begin
      if (n > 2) begin
        m = 0;
        for (int i = 0; i < ND; i++) nxt[i] = '0;
        for (int g = 0; g < ND / 3 + 1; g++) begin
          if (3 * g + 2 < n) begin
            nxt[m]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
            nxt[m+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2]) |
                        (cur[3*g+1] & cur[3*g+2])) << 1;
            m = m + 2;
          end else if (3 * g < n) begin
            nxt[m] = cur[3*g];
            m = m + 1;
            if (3 * g + 1 < n) begin
              nxt[m] = cur[3*g+1];
              m = m + 1;
            end
          end
        end
        for (int i = 0; i < ND; i++) cur[i] = nxt[i];
        n = m;
      end
    end
    p = (n > 1) ? cur[0] + cur[1] : cur[0];
  end
endmodule
