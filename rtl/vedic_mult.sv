// vedic_mult: unsigned integer multiplier with the Vedic Urdhva Tiryagbhyam
// ("vertically and crosswise") structure.
//
// Product digit k is formed in one step from all crosswise partial products
// a[i] & b[k-i] of column k plus the carry handed over from column k-1; the
// low bit of that column sum is the product bit and the rest is the carry into
// column k+1. All column sums are generated in parallel and only the short
// column carries ripple. Combinational; the product has 2W bits.
// The source names Vedic multiplication without detailing it; the column
// form used here is the usual reading of the sutra.
module vedic_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned CW = $clog2(W + 1) + 1;  // column sum width

  always_comb begin
    logic [CW-1:0] col, carry;
    carry = '0;
    for (int k = 0; k < 2*int'(W); k++) begin
      col = carry;
      for (int i = 0; i < int'(W); i++)
        if (k - i >= 0 && k - i < int'(W))
          col = col + CW'(a[i] & b[k-i]);
      p[k]  = col[0];
      carry = col >> 1;
    end
  end
endmodule
