// gf2m_add: addition in GF(2^m).
//
// In a binary field addition has no carries: the sum of two polynomials is the
// bitwise XOR of their coefficient vectors, and subtraction is the same
// operation. This is the "addition using XOR" half of the adder block.
// Purely combinational; M is the field degree.
module gf2m_add #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] s
);
  assign s = a ^ b;
endmodule
