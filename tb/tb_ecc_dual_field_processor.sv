// tb_ecc_dual_field_processor: end-to-end test of the processor at its
// default parameters, through the host bus only.
//
// Random binary and prime curves; for every operation code the operands are
// written to the input buffer, the code to the control register, and after
// done the projective result is read back from the result memory, converted
// to affine and compared with the affine group law. Also checked: latency
// (3 cycles for a point operation, 2M+5 for a scalar multiplication), the
// operation tag word, results of earlier operations staying in their slots,
// writes ignored while busy, codes 0 and 6 ignored, Q = -P giving the point
// at infinity, and the ladder's infinity load and skipped additions.
module tb_ecc_dual_field_processor;
  import ecc_ref_pkg::*;
  import ecc_pkg::*;
  localparam int WD_CYCLES = 400000;
  localparam int M = 8;
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

  logic rst_n, wr_en, rd_en, rd_valid, busy, done;
  logic [3:0] wr_addr, rd_addr;
  logic [M-1:0] wr_data, rd_data;

  ecc_dual_field_processor dut (.*);

  // mechanism counters
  int n_op [8];
  int n_locked_write = 0, n_ignored_code = 0, n_neg_inf = 0, n_inf_load = 0, n_skip_add = 0;
  always @(posedge clk) if (dut.u_ladder.state == dut.u_ladder.S_ADD) begin
    if (dut.acc_z == 0 && dut.k[dut.u_ladder.idx]) n_inf_load++;
    if (!dut.k[dut.u_ladder.idx]) n_skip_add++;
  end

  task automatic bus_write(logic [3:0] a, logic [M-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic bus_read(logic [3:0] a, output logic [M-1:0] d);
    @(negedge clk);
    rd_en = 1; rd_addr = a;
    @(negedge clk);
    rd_en = 0;
    check(rd_valid, "read valid");
    d = rd_data;
  endtask

  // Issue an operation; returns cycles from the control write to done.
  task automatic run_op(ecc_op_e op, output int cyc, input bit poke_while_busy = 0);
    @(negedge clk);
    wr_en = 1; wr_addr = A_CTRL; wr_data = M'(op);
    @(negedge clk);
    wr_en = 0; cyc = 1;
    if (poke_while_busy) begin
      wr_en = 1; wr_addr = A_PX; wr_data = ~dut.px;  // must be ignored
      if (busy) n_locked_write++;
    end
    while (!done && cyc < 200) begin @(negedge clk); wr_en = 0; cyc++; end
    n_op[op]++;
  endtask

  task automatic read_point(logic [3:0] base, output int X, output int Y, output int Z);
    logic [M-1:0] d;
    bus_read(base, d); X = d;
    bus_read(base + 1, d); Y = d;
    bus_read(base + 2, d); Z = d;
  endtask

  initial begin
    int round = 0;
    rst_n = 0; wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    foreach (n_op[i]) n_op[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Codes 0 and 6 do nothing.
    for (int i = 0; i < 2; i++) begin
      bus_write(A_CTRL, M'(i == 0 ? 0 : 6));
      @(negedge clk);
      if (!busy) n_ignored_code++;
      check(!busy, "unused code ignored");
    end

    while (round < 60) begin
      automatic bit prime = round[0];
      automatic int a, b, md, X, Y, Z, qX, qY, qZ, cyc, kk;
      automatic apt_t q, s, ref_r, got, keep_ref;
      automatic bit degen, neg;
      automatic logic [M-1:0] tag;
      if (!prime) begin
        md = POLYS[round % NPOLY]; a = $urandom_range(0, 255); b = $urandom_range(1, 255);
        q = b_rand_point(a, b, md); s = b_rand_point(a, b, md);
      end else begin
        md = PRIMES[round % NPRIME]; a = $urandom_range(0, md - 1); b = $urandom_range(0, md - 1);
        if (!p_curve_ok(a, b, md)) continue;
        q = p_rand_point(a, b, md); s = p_rand_point(a, b, md);
      end
      neg = (round % 10 == 1 || round % 10 == 2);
      if (neg) begin s.x = q.x; s.y = prime ? md - q.y : q.x ^ q.y; end  // s = -q
      else if (q.x == s.x) continue;
      kk = $urandom_range(1, 255);
      ref_r = smul(kk, s, prime, a, md, degen);
      if (degen) continue;
      if (prime) p_to_proj(q, $urandom_range(1, md - 1), md, qX, qY, qZ);
      else b_to_proj(q, $urandom_range(1, 255), md, qX, qY, qZ);
      bus_write(A_PX, M'(s.x)); bus_write(A_PY, M'(s.y));
      bus_write(A_QX, M'(qX));  bus_write(A_QY, M'(qY)); bus_write(A_QZ, M'(qZ));
      bus_write(A_CA, M'(a));   bus_write(A_CB, M'(b));  bus_write(A_MOD, M'(md));
      bus_write(A_K, M'(kk));

      // point addition Q + P
      run_op(prime ? OP_PF_ADD : OP_BF_ADD, cyc, 1'b1);
      check(cyc == 3, $sformatf("add latency %0d", cyc));
      read_point(prime ? M_PF_ADD : M_BF_ADD, X, Y, Z);
      got = prime ? p_to_aff(X, Y, Z, md) : b_to_aff(X, Y, Z, md);
      keep_ref = prime ? p_add(q, s, a, md) : b_add(q, s, a, md);
      check(same(got, keep_ref), $sformatf("add prime=%0d", prime));
      if (neg && got.inf) n_neg_inf++;
      bus_read(M_LASTOP, tag);
      check(tag == M'(prime ? OP_PF_ADD : OP_BF_ADD), "tag add");

      // point doubling 2Q
      run_op(prime ? OP_PF_DBL : OP_BF_DBL, cyc);
      check(cyc == 3, $sformatf("dbl latency %0d", cyc));
      read_point(prime ? M_PF_DBL : M_BF_DBL, X, Y, Z);
      got = prime ? p_to_aff(X, Y, Z, md) : b_to_aff(X, Y, Z, md);
      check(same(got, prime ? p_dbl(q, a, md) : b_dbl(q, a, md)), $sformatf("dbl prime=%0d", prime));

      // the addition result is still in its slot
      read_point(prime ? M_PF_ADD : M_BF_ADD, X, Y, Z);
      got = prime ? p_to_aff(X, Y, Z, md) : b_to_aff(X, Y, Z, md);
      check(same(got, keep_ref), "add slot kept");

      // scalar multiplication k*P
      run_op(prime ? OP_PF_SMUL : OP_BF_SMUL, cyc, 1'b1);
      check(cyc == 2 * M + 5, $sformatf("smul latency %0d", cyc));
      read_point(M_SMUL, X, Y, Z);
      got = prime ? p_to_aff(X, Y, Z, md) : b_to_aff(X, Y, Z, md);
      check(same(got, ref_r), $sformatf("smul prime=%0d k=%0d", prime, kk));
      bus_read(M_LASTOP, tag);
      check(tag == M'(prime ? OP_PF_SMUL : OP_BF_SMUL), "tag smul");
      round++;
    end

    $display("ops: bf_add=%0d bf_dbl=%0d pf_add=%0d pf_dbl=%0d bf_smul=%0d pf_smul=%0d",
             n_op[OP_BF_ADD], n_op[OP_BF_DBL], n_op[OP_PF_ADD], n_op[OP_PF_DBL],
             n_op[OP_BF_SMUL], n_op[OP_PF_SMUL]);
    $display("locked writes=%0d ignored codes=%0d Q=-P infinities=%0d inf loads=%0d skipped adds=%0d",
             n_locked_write, n_ignored_code, n_neg_inf, n_inf_load, n_skip_add);
    for (int i = 1; i < 8; i++)
      if (i != 6) check(n_op[i] > 0, $sformatf("operation %0d exercised", i));
    check(n_locked_write > 0, "write while busy exercised");
    check(n_ignored_code == 2, "unused codes exercised");
    check(n_neg_inf > 0, "Q = -P exercised");
    check(n_inf_load > 0, "ladder infinity load exercised");
    check(n_skip_add > 0, "ladder zero bit exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
