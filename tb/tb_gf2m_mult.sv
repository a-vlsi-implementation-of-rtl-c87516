// tb_gf2m_mult: Karatsuba GF(2^8) multiplier and the shift squarer against a shift-and-add reference, for several field polynomials.
module tb_gf2m_mult;
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
  logic [7:0] a, b, poly, p, sq;
  gf2m_mult dut (.a, .b, .poly, .p);
  gf2m_sqr  u_sqr (.a, .poly, .p(sq));
  initial begin
    for (int n = 0; n < 6000; n++) begin
      automatic int f = POLYS[n % NPOLY];
      automatic int ia = $urandom_range(0, 255), ib = $urandom_range(0, 255);
      if (n < 256) begin ia = n; ib = 255 - n; end
      poly = 8'(f); a = 8'(ia); b = 8'(ib); #1;
      check(int'(p) == bmul(ia, ib, f), $sformatf("%02x*%02x mod %02x = %02x", ia, ib, f, p));
      check(int'(sq) == bmul(ia, ia, f), $sformatf("%02x^2 mod %02x = %02x", ia, f, sq));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
