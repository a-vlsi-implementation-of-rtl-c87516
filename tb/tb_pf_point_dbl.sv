// tb_pf_point_dbl: GF(p) Jacobian point doubling against the affine group law.
module tb_pf_point_dbl;
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
  logic [7:0] qx, qy, qz, ca, p, rx, ry, rz;
  pf_point_dbl dut (.qx, .qy, .qz, .ca, .p, .rx, .ry, .rz);
  initial begin
    automatic int n = 0;
    while (n < 300) begin
      automatic int pp = PRIMES[n % NPRIME], a = $urandom_range(0, pp - 1), b = $urandom_range(0, pp - 1);
      automatic int X, Y, Z;
      automatic apt_t q, ref_r, got;
      if (!p_curve_ok(a, b, pp)) continue;
      q = p_rand_point(a, b, pp);
      p_to_proj(q, $urandom_range(1, pp - 1), pp, X, Y, Z);
      qx = 8'(X); qy = 8'(Y); qz = 8'(Z); ca = 8'(a); p = 8'(pp);
      #1;
      ref_r = p_dbl(q, a, pp);
      got = p_to_aff(rx, ry, rz, pp);
      check(same(got, ref_r), $sformatf("dbl (%0d,%0d) mod %0d", q.x, q.y, pp));
      check(p_on_curve(got, a, b, pp), "result on curve");
      n++;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
