// tb_bf_point_add: GF(2^8) mixed point addition against the affine group law. Random curves, random points, random projective Z.
module tb_bf_point_add;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (WD_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int WD_CYCLES = 100000;
  logic [7:0] qx, qy, qz, px, py, ca, poly, rx, ry, rz;
  bf_point_add dut (.qx, .qy, .qz, .px, .py, .ca, .poly, .rx, .ry, .rz);
  initial begin
    automatic int n = 0;
    while (n < 300) begin
      automatic int f = POLYS[n % NPOLY], a = $urandom_range(0, 255), b = $urandom_range(1, 255);
      automatic int X, Y, Z;
      automatic apt_t q = b_rand_point(a, b, f), s = b_rand_point(a, b, f), ref_r, got;
      if (q.x == s.x) continue;
      b_to_proj(q, $urandom_range(1, 255), f, X, Y, Z);
      qx = 8'(X); qy = 8'(Y); qz = 8'(Z); px = 8'(s.x); py = 8'(s.y); ca = 8'(a); poly = 8'(f);
      #1;
      ref_r = b_add(q, s, a, f);
      got = b_to_aff(rx, ry, rz, f);
      check(same(got, ref_r), $sformatf("add (%0d,%0d)+(%0d,%0d)", q.x, q.y, s.x, s.y));
      check(b_on_curve(got, a, b, f), "result on curve");
      n++;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
