// gf2m_reduce: reduction of a polynomial of degree <= 2M-2 modulo
// f(x) = x^M + g(x), where g is given as the M-bit input poly.
//
// Coefficients are cleared from the top down: whenever coefficient i >= M is
// set it is removed and g(x)*x^(i-M) is added (XOR) in its place, using
// x^M = g(x). Combinational; the field polynomial is an input so any degree-M
// irreducible polynomial can be used.
module gf2m_reduce #(
  parameter int unsigned M = 8
) (
  input  logic [2*M-2:0] c,
  input  logic [M-1:0]   poly,
  output logic [M-1:0]   r
);
  always_comb begin
    logic [2*M-2:0] t;
    t = c;
    for (int i = 2*M-2; i >= int'(M); i--) begin
      if (t[i]) begin
        t[i] = 1'b0;
        t[i-M +: M] = t[i-M +: M] ^ poly;
      end
    end
    r = t[M-1:0];
  end
endmodule
