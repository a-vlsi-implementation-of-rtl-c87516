// tb_ecc_arith_unit: arithmetic unit: each of the four selectable point operations against the affine group law.
module tb_ecc_arith_unit;
  import ecc_ref_pkg::*;
  import ecc_pkg::*;
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
  logic prime, dbl;
  logic [7:0] bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly;
  logic [7:0] pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p;
  logic [7:0] rx, ry, rz;
  ecc_arith_unit dut (.*);
  initial begin
    automatic int n = 0;
    while (n < 400) begin
      automatic int X, Y, Z;
      automatic apt_t q, s, ref_r, got;
      prime = n[0]; dbl = n[1];
      if (!prime) begin
        automatic int f = POLYS[n % NPOLY], a = $urandom_range(0, 255), b = $urandom_range(1, 255);
        q = b_rand_point(a, b, f); s = b_rand_point(a, b, f);
        if (!dbl && q.x == s.x) continue;
        b_to_proj(q, $urandom_range(1, 255), f, X, Y, Z);
        {bf_qx, bf_qy, bf_qz, bf_px, bf_py} = {8'(X), 8'(Y), 8'(Z), 8'(s.x), 8'(s.y)};
        {bf_ca, bf_cb, bf_poly} = {8'(a), 8'(b), 8'(f)};
        {pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p} = {$urandom, $urandom};
        #1;
        ref_r = dbl ? b_dbl(q, a, f) : b_add(q, s, a, f);
        got = b_to_aff(rx, ry, rz, f);
      end else begin
        automatic int pp = PRIMES[n % NPRIME], a = $urandom_range(0, pp - 1), b = $urandom_range(0, pp - 1);
        if (!p_curve_ok(a, b, pp)) continue;
        q = p_rand_point(a, b, pp); s = p_rand_point(a, b, pp);
        if (!dbl && q.x == s.x) continue;
        p_to_proj(q, $urandom_range(1, pp - 1), pp, X, Y, Z);
        {pf_qx, pf_qy, pf_qz, pf_px, pf_py} = {8'(X), 8'(Y), 8'(Z), 8'(s.x), 8'(s.y)};
        {pf_ca, pf_p} = {8'(a), 8'(pp)};
        {bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly} = {$urandom, $urandom};
        #1;
        ref_r = dbl ? p_dbl(q, a, pp) : p_add(q, s, a, pp);
        got = p_to_aff(rx, ry, rz, pp);
      end
      check(same(got, ref_r), $sformatf("prime=%0d dbl=%0d", prime, dbl));
      n++;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
