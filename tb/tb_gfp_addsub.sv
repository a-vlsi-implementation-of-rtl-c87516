// tb_gfp_addsub: modular adder/subtractor against integer arithmetic mod p.
module tb_gfp_addsub;
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
  logic sub;
  gfp_addsub dut (.a, .b, .p, .sub, .r);
  initial begin
    for (int n = 0; n < 4000; n++) begin
      automatic int pp = PRIMES[n % NPRIME];
      automatic int ia = (n < 8) ? pp - 1 : $urandom_range(0, pp - 1);
      automatic int ib = (n < 8) ? pp - 1 - n : $urandom_range(0, pp - 1);
      p = 8'(pp); a = 8'(ia); b = 8'(ib);
      sub = 0; #1;
      check(int'(r) == (ia + ib) % pp, $sformatf("%0d+%0d mod %0d = %0d", ia, ib, pp, r));
      sub = 1; #1;
      check(int'(r) == psub(ia, ib, pp), $sformatf("%0d-%0d mod %0d = %0d", ia, ib, pp, r));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
