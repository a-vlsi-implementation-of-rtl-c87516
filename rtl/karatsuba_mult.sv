// karatsuba_mult: hybrid Karatsuba carry-less (GF(2)[x]) polynomial
// multiplier.
//
// Operands of W bits are split into a low half of L = W/2 bits and a high half
// of H = W - L bits. Three half-size products replace the four of the
// schoolbook method,
//   lo = al*bl,  hi = ah*bh,  mid = (al+ah)*(bl+bh),
// and are combined as hi*x^(2L) + (mid + lo + hi)*x^L + lo, where + is XOR.
// The half-size products are formed by schoolbook multipliers, which makes
// the structure a hybrid Karatsuba multiplier (one Karatsuba level over
// schoolbook leaves). Combinational; the 2W-1 coefficient result is not
// reduced. W must be at least 2.
module karatsuba_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  localparam int unsigned L = W / 2;
  localparam int unsigned H = W - L;

  logic [L-1:0]   al, bl;
  logic [H-1:0]   ah, bh, as, bs;
  logic [2*L-2:0] lo;
  logic [2*H-2:0] hi, mid, mid_sum;

  assign al = a[L-1:0];
  assign ah = a[W-1:L];
  assign bl = b[L-1:0];
  assign bh = b[W-1:L];
  assign as = ah ^ H'(al);
  assign bs = bh ^ H'(bl);

  clmul_school #(.W(L)) u_lo  (.a(al), .b(bl), .p(lo));
  clmul_school #(.W(H)) u_hi  (.a(ah), .b(bh), .p(hi));
  clmul_school #(.W(H)) u_mid (.a(as), .b(bs), .p(mid));

  assign mid_sum = mid ^ hi ^ (2*H-1)'(lo);
  assign p = (2*W-1)'(lo) ^ ((2*W-1)'(mid_sum) << L) ^ ((2*W-1)'(hi) << (2*L));
endmodule
