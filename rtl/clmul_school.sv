// clmul_school: schoolbook carry-less (GF(2)[x]) polynomial multiplier.
//
// Coefficient i+j of the product is the XOR of all partial products
// a[i] & b[j]. Used for the small sub-products of the hybrid Karatsuba
// multiplier. Combinational; the result has 2W-1 coefficients.
module clmul_school #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  always_comb begin
    p = '0;
    for (int i = 0; i < int'(W); i++)
      for (int j = 0; j < int'(W); j++)
        p[i+j] = p[i+j] ^ (a[i] & b[j]);
  end
endmodule
