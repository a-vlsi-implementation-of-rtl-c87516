// pf_point_dbl: Jacobian point doubling over GF(p).
//
// Curve y^2 = x^3 + a x + b mod p, points in Jacobian coordinates
// (x = X/Z^2, y = Y/Z^3). Computes (X4, Y4, Z4) = 2*(X1, Y1, Z1):
//   A = 3*X1^2 + a*Z1^4     B = 4*X1*Y1^2     C = 8*Y1^4
//   X4 = A^2 - 2*B          Z4 = 2*Y1*Z1      Y4 = A*(B - X4) - C
// exactly as in the published formulas. Products use the Vedic modular multiplier; the small
// constant multiples are chains of modular additions. Purely combinational.
// The point at infinity (Z1 = 0) and points with y = 0 double to Z4 = 0.
module pf_point_dbl #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] qx, qy, qz,  // Jacobian input point
  input  logic [M-1:0] ca,          // curve coefficient a (reduced mod p)
  input  logic [M-1:0] p,           // prime modulus
  output logic [M-1:0] rx, ry, rz   // Jacobian 2*Q
);
  logic [M-1:0] x2, x2d, x23, z2, z4, az4, ta, y2, xy2, xy2d, tb, a2, b2;
  logic [M-1:0] yz, y4, y4d, y4q, tc, bx, abx;

  gfp_mult   #(.M(M)) u_m1  (.a(qx), .b(qx), .p(p), .r(x2));                // X1^2
  gfp_addsub #(.M(M)) u_a1  (.a(x2), .b(x2), .p(p), .sub(1'b0), .r(x2d));
  gfp_addsub #(.M(M)) u_a2  (.a(x2d), .b(x2), .p(p), .sub(1'b0), .r(x23));  // 3*X1^2
  gfp_mult   #(.M(M)) u_m2  (.a(qz), .b(qz), .p(p), .r(z2));                // Z1^2
  gfp_mult   #(.M(M)) u_m3  (.a(z2), .b(z2), .p(p), .r(z4));                // Z1^4
  gfp_mult   #(.M(M)) u_m4  (.a(ca), .b(z4), .p(p), .r(az4));               // a*Z1^4
  gfp_addsub #(.M(M)) u_a3  (.a(x23), .b(az4), .p(p), .sub(1'b0), .r(ta));  // A
  gfp_mult   #(.M(M)) u_m5  (.a(qy), .b(qy), .p(p), .r(y2));                // Y1^2
  gfp_mult   #(.M(M)) u_m6  (.a(qx), .b(y2), .p(p), .r(xy2));               // X1*Y1^2
  gfp_addsub #(.M(M)) u_a4  (.a(xy2), .b(xy2), .p(p), .sub(1'b0), .r(xy2d));
  gfp_addsub #(.M(M)) u_a5  (.a(xy2d), .b(xy2d), .p(p), .sub(1'b0), .r(tb)); // B
  gfp_mult   #(.M(M)) u_m7  (.a(ta), .b(ta), .p(p), .r(a2));                // A^2
  gfp_addsub #(.M(M)) u_a6  (.a(tb), .b(tb), .p(p), .sub(1'b0), .r(b2));    // 2*B
  gfp_addsub #(.M(M)) u_a7  (.a(a2), .b(b2), .p(p), .sub(1'b1), .r(rx));    // X4
  gfp_mult   #(.M(M)) u_m8  (.a(qy), .b(qz), .p(p), .r(yz));                // Y1*Z1
  gfp_addsub #(.M(M)) u_a8  (.a(yz), .b(yz), .p(p), .sub(1'b0), .r(rz));    // Z4
  gfp_mult   #(.M(M)) u_m9  (.a(y2), .b(y2), .p(p), .r(y4));                // Y1^4
  gfp_addsub #(.M(M)) u_a9  (.a(y4), .b(y4), .p(p), .sub(1'b0), .r(y4d));
  gfp_addsub #(.M(M)) u_a10 (.a(y4d), .b(y4d), .p(p), .sub(1'b0), .r(y4q));
  gfp_addsub #(.M(M)) u_a11 (.a(y4q), .b(y4q), .p(p), .sub(1'b0), .r(tc));  // C
  gfp_addsub #(.M(M)) u_a12 (.a(tb), .b(rx), .p(p), .sub(1'b1), .r(bx));    // B - X4
  gfp_mult   #(.M(M)) u_m10 (.a(ta), .b(bx), .p(p), .r(abx));
  gfp_addsub #(.M(M)) u_a13 (.a(abx), .b(tc), .p(p), .sub(1'b1), .r(ry));  // Y4
endmodule
