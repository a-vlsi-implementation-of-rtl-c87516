// tb_ecc_scalar_ladder: scalar-multiplication unit driving the real register
// file, data selector and arithmetic unit. k*P on random binary and prime
// curves is compared with an affine double-and-add reference, and done must
// come 2M+2 cycles after start.
module tb_ecc_scalar_ladder;
  import ecc_ref_pkg::*;
  localparam int WD_CYCLES = 200000;
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

  initial begin
    repeat (WD_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, start, prime, busy, done, dbl, we;
  logic [7:0] k, px, py, ca, cb, modulus;
  logic [7:0] acc_x, acc_y, acc_z, res_x, res_y, res_z, r_x, r_y, r_z, wx, wy, wz;
  logic [7:0] bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly;
  logic [7:0] pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p;

  ecc_scalar_ladder dut (
    .clk, .rst_n, .start, .k, .px, .py, .acc_x, .acc_y, .acc_z,
    .r_x, .r_y, .r_z, .busy, .done, .dbl, .we, .wx, .wy, .wz);
  ecc_regfile u_rf (
    .clk, .rst_n, .we, .wsel(1'b1), .wx, .wy, .wz,
    .res_x, .res_y, .res_z, .acc_x, .acc_y, .acc_z);
  ecc_data_select u_sel (
    .prime, .use_acc(1'b1), .buf_qx(8'd0), .buf_qy(8'd0), .buf_qz(8'd0),
    .acc_qx(acc_x), .acc_qy(acc_y), .acc_qz(acc_z), .px, .py, .ca, .cb, .modulus,
    .bf_qx, .bf_qy, .bf_qz, .bf_px, .bf_py, .bf_ca, .bf_cb, .bf_poly,
    .pf_qx, .pf_qy, .pf_qz, .pf_px, .pf_py, .pf_ca, .pf_p);
  ecc_arith_unit u_arith (
    .prime, .dbl, .bf_qx, .bf_qy, .bf_qz, .bf_px, .bf_py, .bf_ca, .bf_cb, .bf_poly,
    .pf_qx, .pf_qy, .pf_qz, .pf_px, .pf_py, .pf_ca, .pf_p, .rx(r_x), .ry(r_y), .rz(r_z));

  int inf_loads = 0, skipped_adds = 0;
  always @(posedge clk) if (busy && !dbl && dut.state == dut.S_ADD) begin
    if (acc_z == 0 && k[dut.idx]) inf_loads++;
    if (!k[dut.idx]) skipped_adds++;
  end

  initial begin
    int n = 0;
    rst_n = 0; start = 0; k = 0; prime = 0;
    {px, py, ca, cb, modulus} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n < 120) begin
      automatic int kk = (n < 4) ? (n == 0 ? 1 : n == 1 ? 255 : n == 2 ? 128 : 0) : $urandom_range(0, 255);
      automatic apt_t pt, ref_r, got;
      automatic bit degen;
      automatic int a, b, md, cyc = 0;
      prime = n[0];
      if (!prime) begin
        md = POLYS[n % NPOLY]; a = $urandom_range(0, 255); b = $urandom_range(1, 255);
        pt = b_rand_point(a, b, md);
      end else begin
        md = PRIMES[n % NPRIME]; a = $urandom_range(0, md - 1); b = $urandom_range(0, md - 1);
        if (!p_curve_ok(a, b, md)) continue;
        pt = p_rand_point(a, b, md);
      end
      ref_r = smul(kk, pt, prime, a, md, degen);
      if (degen) continue;
      {px, py, ca, cb, modulus, k} = {8'(pt.x), 8'(pt.y), 8'(a), 8'(b), 8'(md), 8'(kk)};
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0; cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == 2 * 8 + 2, $sformatf("latency %0d", cyc));
      @(negedge clk);
      got = prime ? p_to_aff(acc_x, acc_y, acc_z, md) : b_to_aff(acc_x, acc_y, acc_z, md);
      check(same(got, ref_r), $sformatf("prime=%0d k=%0d (%0d,%0d)", prime, kk, pt.x, pt.y));
      check(!busy, "idle after done");
      n++;
    end
    check(inf_loads > 0, "accumulator at infinity loaded P");
    check(skipped_adds > 0, "zero bits skip the write-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
