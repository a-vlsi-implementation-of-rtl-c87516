// gf2m_mult: multiplication in GF(2^M).
//
// The hybrid Karatsuba multiplier forms the 2M-1 bit carry-less product, which
// is then reduced modulo f(x) = x^M + poly(x). Combinational.
module gf2m_mult #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] poly,
  output logic [M-1:0] p
);
  logic [2*M-2:0] c;

  karatsuba_mult #(.W(M)) u_kara (.a(a), .b(b), .p(c));
  gf2m_reduce    #(.M(M)) u_red  (.c(c), .poly(poly), .r(p));
endmodule
