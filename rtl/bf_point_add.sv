// bf_point_add: mixed-coordinate point addition over GF(2^M).
//
// Curve y^2 + xy = x^3 + a x^2 + b. Q = (X, Y, Z) is in Lopez-Dahab projective
// coordinates (x = X/Z, y = Y/Z^2), P = (px, py) is affine, and R = Q + P is
// returned in projective coordinates, so no field inversion is needed. The
// datapath follows the published mixed-addition sequence step by step:
//   A = Y + py*Z^2      B = X + px*Z       C = B*Z        Z3 = C^2
//   D = px*Z3           E = A + B^2 + a*C  X3 = A^2 + C*E  I = D + X3
//   J = A*C + Z3        F = I*J            K = Z3^2
//   Y3 = F + px*K + py*K
// Multiplications use the Karatsuba multiplier, squarings the shift squarer,
// additions the XOR adder. Purely combinational: the result is valid one
// propagation delay after the operands. Not handled (nor in the published sequence):
// Q at infinity (Z = 0) and Q equal to P, for which the sequence yields Z3 = 0.
module bf_point_add #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] qx, qy, qz,  // projective Q
  input  logic [M-1:0] px, py,      // affine P
  input  logic [M-1:0] ca,          // curve coefficient a
  input  logic [M-1:0] poly,        // f(x) = x^M + poly(x)
  output logic [M-1:0] rx, ry, rz   // projective R = Q + P
);
  logic [M-1:0] z2, t2, ta, t3, tb, tc, z3, td, b2, ac, t4, te;
  logic [M-1:0] a2, ce, ti, t8, tj, tf, tk, t9, t10, t11;

  gf2m_sqr  #(.M(M)) u_s1  (.a(qz), .poly(poly), .p(z2));          // Z^2
  gf2m_mult #(.M(M)) u_m1  (.a(py), .b(z2), .poly(poly), .p(t2));   // py*Z^2
  gf2m_add  #(.M(M)) u_a1  (.a(qy), .b(t2), .s(ta));                // A
  gf2m_mult #(.M(M)) u_m2  (.a(px), .b(qz), .poly(poly), .p(t3));   // px*Z
  gf2m_add  #(.M(M)) u_a2  (.a(qx), .b(t3), .s(tb));                // B
  gf2m_mult #(.M(M)) u_m3  (.a(tb), .b(qz), .poly(poly), .p(tc));   // C
  gf2m_sqr  #(.M(M)) u_s2  (.a(tc), .poly(poly), .p(z3));           // Z3
  gf2m_mult #(.M(M)) u_m4  (.a(px), .b(z3), .poly(poly), .p(td));   // D
  gf2m_sqr  #(.M(M)) u_s3  (.a(tb), .poly(poly), .p(b2));           // B^2
  gf2m_mult #(.M(M)) u_m5  (.a(ca), .b(tc), .poly(poly), .p(ac));   // a*C
  gf2m_add  #(.M(M)) u_a3  (.a(ta), .b(b2), .s(t4));
  gf2m_add  #(.M(M)) u_a4  (.a(t4), .b(ac), .s(te));                // E
  gf2m_sqr  #(.M(M)) u_s4  (.a(ta), .poly(poly), .p(a2));           // A^2
  gf2m_mult #(.M(M)) u_m6  (.a(tc), .b(te), .poly(poly), .p(ce));   // C*E
  gf2m_add  #(.M(M)) u_a5  (.a(a2), .b(ce), .s(rx));                // X3
  gf2m_add  #(.M(M)) u_a6  (.a(td), .b(rx), .s(ti));                // I
  gf2m_mult #(.M(M)) u_m7  (.a(ta), .b(tc), .poly(poly), .p(t8));   // A*C
  gf2m_add  #(.M(M)) u_a7  (.a(t8), .b(z3), .s(tj));                // J
  gf2m_mult #(.M(M)) u_m8  (.a(ti), .b(tj), .poly(poly), .p(tf));   // F
  gf2m_sqr  #(.M(M)) u_s5  (.a(z3), .poly(poly), .p(tk));           // K
  gf2m_mult #(.M(M)) u_m9  (.a(px), .b(tk), .poly(poly), .p(t9));   // px*K
  gf2m_mult #(.M(M)) u_m10 (.a(py), .b(tk), .poly(poly), .p(t10));  // py*K
  gf2m_add  #(.M(M)) u_a8  (.a(tf), .b(t9), .s(t11));
  gf2m_add  #(.M(M)) u_a9  (.a(t11), .b(t10), .s(ry));              // Y3

  assign rz = z3;
endmodule
