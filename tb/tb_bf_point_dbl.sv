// tb_bf_point_dbl: GF(2^8) projective point doubling against the affine group law, including the point at infinity.
module tb_bf_point_dbl;
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
  logic [7:0] qx, qy, qz, ca, cb, poly, rx, ry, rz;
  bf_point_dbl dut (.qx, .qy, .qz, .ca, .cb, .poly, .rx, .ry, .rz);
  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic int f = POLYS[n % NPOLY], a = $urandom_range(0, 255), b = $urandom_range(1, 255);
      automatic int X, Y, Z;
      automatic apt_t q = b_rand_point(a, b, f), ref_r, got;
      b_to_proj(q, $urandom_range(1, 255), f, X, Y, Z);
      if (n % 50 == 0) Z = 0;  // point at infinity
      qx = 8'(X); qy = 8'(Y); qz = 8'(Z); ca = 8'(a); cb = 8'(b); poly = 8'(f);
      #1;
      if (Z == 0) ref_r = '{x: 0, y: 0, inf: 1};
      else ref_r = b_dbl(q, a, f);
      got = b_to_aff(rx, ry, rz, f);
      check(same(got, ref_r), $sformatf("dbl (%0d,%0d) Z=%0d", q.x, q.y, Z));
      check(b_on_curve(got, a, b, f), "result on curve");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
