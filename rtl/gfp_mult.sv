// gfp_mult: modular multiplication in GF(p).
//
// The Vedic multiplier forms the 2M-bit integer product, which is reduced
// modulo p by restoring division: the product is shifted into an (M+1)-bit
// remainder one bit at a time, most significant first, and p is subtracted
// whenever the remainder reaches p. Operands must be below p; p is an input
// (any modulus >= 2 below 2^M). Combinational. Squaring uses the same unit.
// The Vedic product follows the source; the reduction method is this
// design's own choice.
module gfp_mult #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] p,
  output logic [M-1:0] r
);
  logic [2*M-1:0] prod;

  vedic_mult #(.W(M)) u_vedic (.a(a), .b(b), .p(prod));

  always_comb begin
    logic [M:0] rem;
    rem = '0;
    for (int i = 2*M-1; i >= 0; i--) begin
      rem = {rem[M-1:0], prod[i]};
      if (rem >= {1'b0, p}) rem = rem - {1'b0, p};
    end
    r = rem[M-1:0];
  end
endmodule
