// bf_point_dbl: projective point doubling over GF(2^M).
//
// Curve y^2 + xy = x^3 + a x^2 + b, points in Lopez-Dahab projective
// coordinates (x = X/Z, y = Y/Z^2). Computes (X4, Y4, Z4) = 2*(X1, Y1, Z1):
//   Z4 = Z1^2 * X1^2
//   X4 = X1^4 + b*Z1^4
//   Y4 = (Y1^2 + a*Z4 + b*Z1^4) * X4 + Z4 * b*Z1^4
// exactly as in the published formulas. Squarings use the shift squarer, multiplications the
// Karatsuba multiplier, additions the XOR adder. Purely combinational. The
// point at infinity (Z1 = 0) doubles to Z4 = 0, and so does a point with x = 0.
module bf_point_dbl #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] qx, qy, qz,  // projective input point
  input  logic [M-1:0] ca, cb,      // curve coefficients a, b
  input  logic [M-1:0] poly,        // f(x) = x^M + poly(x)
  output logic [M-1:0] rx, ry, rz   // projective 2*Q
);
  logic [M-1:0] z2, x2, x4, z4, bz4, y2, az, s1, s2, t1, t2;

  gf2m_sqr  #(.M(M)) u_s1 (.a(qz), .poly(poly), .p(z2));           // Z1^2
  gf2m_sqr  #(.M(M)) u_s2 (.a(qx), .poly(poly), .p(x2));           // X1^2
  gf2m_mult #(.M(M)) u_m1 (.a(z2), .b(x2), .poly(poly), .p(rz));   // Z4
  gf2m_sqr  #(.M(M)) u_s3 (.a(x2), .poly(poly), .p(x4));           // X1^4
  gf2m_sqr  #(.M(M)) u_s4 (.a(z2), .poly(poly), .p(z4));           // Z1^4
  gf2m_mult #(.M(M)) u_m2 (.a(cb), .b(z4), .poly(poly), .p(bz4));  // b*Z1^4
  gf2m_add  #(.M(M)) u_a1 (.a(x4), .b(bz4), .s(rx));               // X4
  gf2m_sqr  #(.M(M)) u_s5 (.a(qy), .poly(poly), .p(y2));           // Y1^2
  gf2m_mult #(.M(M)) u_m3 (.a(ca), .b(rz), .poly(poly), .p(az));   // a*Z4
  gf2m_add  #(.M(M)) u_a2 (.a(y2), .b(az), .s(s1));
  gf2m_add  #(.M(M)) u_a3 (.a(s1), .b(bz4), .s(s2));
  gf2m_mult #(.M(M)) u_m4 (.a(s2), .b(rx), .poly(poly), .p(t1));
  gf2m_mult #(.M(M)) u_m5 (.a(rz), .b(bz4), .poly(poly), .p(t2));
  gf2m_add  #(.M(M)) u_a4 (.a(t1), .b(t2), .s(ry));                // Y4
endmodule
