// gf2m_sqr: squaring in GF(2^M).
//
// Squaring a binary polynomial needs no multiplier: coefficient i moves to
// position 2i (a shift that spreads the bits apart with zeros between them),
// after which the result is reduced modulo f(x) = x^M + poly(x). Combinational.
module gf2m_sqr #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] poly,
  output logic [M-1:0] p
);
  logic [2*M-2:0] c;

  always_comb begin
    c = '0;
    for (int i = 0; i < int'(M); i++) c[2*i] = a[i];
  end

  gf2m_reduce #(.M(M)) u_red (.c(c), .poly(poly), .r(p));
endmodule
