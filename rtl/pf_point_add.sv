// pf_point_add: mixed-coordinate point addition over GF(p).
//
// Curve y^2 = x^3 + a x + b mod p. Q = (X, Y, Z) is in Jacobian coordinates
// (x = X/Z^2, y = Y/Z^3), P = (px, py) is affine, and R = Q + P is returned in
// Jacobian coordinates without any inversion:
//   B = px*Z^2   C = X - B    E = py*Z^3   F = Y - E    G = X + B   H = Y + E
//   Z3 = Z*C     X3 = F^2 - G*C^2          I = G*C^2 - 2*X3
//   Y3 = (I*F - H*C^3) / 2
// The published sequence prints H*C^2 in the last step; only H*C^3 gives a
// point on the curve in these coordinates, so H*C^3 is used here.
// Division by two is a modular halving: an odd value has p added before the
// right shift, so p must be odd. Multiplications and squarings use the Vedic
// modular multiplier, additions and subtractions the modular adder.
// Purely combinational. Not handled (nor in the published sequence): Q at infinity and
// Q equal to P (C = 0 then gives Z3 = 0).
module pf_point_add #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] qx, qy, qz,  // Jacobian Q
  input  logic [M-1:0] px, py,      // affine P
  input  logic [M-1:0] p,           // odd prime modulus
  output logic [M-1:0] rx, ry, rz   // Jacobian R = Q + P
);
  logic [M-1:0] z2, tb, tc, z3, te, tf, tg, th, c2, f2, gc2, x3d, ti;
  logic [M-1:0] ifp, c3, hc3, num;

  gfp_mult   #(.M(M)) u_m1  (.a(qz), .b(qz), .p(p), .r(z2));            // Z^2
  gfp_mult   #(.M(M)) u_m2  (.a(px), .b(z2), .p(p), .r(tb));            // B
  gfp_addsub #(.M(M)) u_a1  (.a(qx), .b(tb), .p(p), .sub(1'b1), .r(tc)); // C
  gfp_mult   #(.M(M)) u_m3  (.a(z2), .b(qz), .p(p), .r(z3));            // Z^3
  gfp_mult   #(.M(M)) u_m4  (.a(py), .b(z3), .p(p), .r(te));            // E
  gfp_addsub #(.M(M)) u_a2  (.a(qy), .b(te), .p(p), .sub(1'b1), .r(tf)); // F
  gfp_addsub #(.M(M)) u_a3  (.a(qx), .b(tb), .p(p), .sub(1'b0), .r(tg)); // G
  gfp_addsub #(.M(M)) u_a4  (.a(qy), .b(te), .p(p), .sub(1'b0), .r(th)); // H
  gfp_mult   #(.M(M)) u_m5  (.a(qz), .b(tc), .p(p), .r(rz));            // Z3
  gfp_mult   #(.M(M)) u_m6  (.a(tc), .b(tc), .p(p), .r(c2));            // C^2
  gfp_mult   #(.M(M)) u_m7  (.a(tf), .b(tf), .p(p), .r(f2));            // F^2
  gfp_mult   #(.M(M)) u_m8  (.a(tg), .b(c2), .p(p), .r(gc2));           // G*C^2
  gfp_addsub #(.M(M)) u_a5  (.a(f2), .b(gc2), .p(p), .sub(1'b1), .r(rx)); // X3
  gfp_addsub #(.M(M)) u_a6  (.a(rx), .b(rx), .p(p), .sub(1'b0), .r(x3d)); // 2*X3
  gfp_addsub #(.M(M)) u_a7  (.a(gc2), .b(x3d), .p(p), .sub(1'b1), .r(ti)); // I
  gfp_mult   #(.M(M)) u_m9  (.a(ti), .b(tf), .p(p), .r(ifp));           // I*F
  gfp_mult   #(.M(M)) u_m10 (.a(c2), .b(tc), .p(p), .r(c3));            // C^3
  gfp_mult   #(.M(M)) u_m11 (.a(th), .b(c3), .p(p), .r(hc3));           // H*C^3
  gfp_addsub #(.M(M)) u_a8  (.a(ifp), .b(hc3), .p(p), .sub(1'b1), .r(num));

  // Modular halving of num.
  always_comb begin
    logic [M:0] t;
    t  = num[0] ? ({1'b0, num} + {1'b0, p}) : {1'b0, num};
    ry = M'(t >> 1);
  end
endmodule
