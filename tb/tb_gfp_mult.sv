// tb_gfp_mult: GF(p) modular multiplier against integer arithmetic mod p.
module tb_gfp_mult;
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
  logic [7:0] a, b, p, r;
  gfp_mult dut (.a, .b, .p, .r);
  initial begin
    for (int n = 0; n < 6000; n++) begin
      automatic int pp = PRIMES[n % NPRIME];
      automatic int ia = $urandom_range(0, pp - 1), ib = $urandom_range(0, pp - 1);
      if (n < 8) begin ia = pp - 1; ib = pp - 1; end
      p = 8'(pp); a = 8'(ia); b = 8'(ib); #1;
      check(int'(r) == (ia * ib) % pp, $sformatf("%0d*%0d mod %0d = %0d", ia, ib, pp, r));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
