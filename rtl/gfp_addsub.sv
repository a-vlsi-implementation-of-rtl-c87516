// gfp_addsub: modular addition / subtraction in GF(p).
//
// The "normal" (binary, carry-propagate) adder of the prime-field side. With
// sub = 0 it returns (a + b) mod p, with sub = 1 it returns (a - b) mod p.
// Operands must already be reduced (a, b < p). The sum is formed one bit wider
// than the operands and corrected by one conditional subtraction of p; the
// difference is corrected by one conditional addition of p.
// Purely combinational; p is an input so any odd modulus below 2^M works.
// The single-correction structure is this design's choice; the source only
// says that prime-field additions use ordinary (non-redundant) adders.
module gfp_addsub #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] p,
  input  logic         sub,
  output logic [M-1:0] r
);
  logic [M:0]   sum, dif;
  logic [M-1:0] sum_c, dif_c;

  always_comb begin
    sum   = {1'b0, a} + {1'b0, b};
    sum_c = sum[M-1:0] - p;            // correct modulo 2^M since sum - p < p
    dif   = {1'b0, a} - {1'b0, b};     // bit M set when a < b
    dif_c = dif[M-1:0] + p;
    if (sub) r = dif[M] ? dif_c : dif[M-1:0];
    else     r = (sum >= {1'b0, p}) ? sum_c : sum[M-1:0];
  end
endmodule
