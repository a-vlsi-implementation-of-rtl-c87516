// tb_gf2m_add: XOR field adder against bit-by-bit addition modulo 2, exhaustive.
module tb_gf2m_add;
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
  logic [7:0] a, b, s;
  gf2m_add dut (.a, .b, .s);
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j += 7) begin
        automatic int ref_s = 0;
        a = 8'(i); b = 8'(j); #1;
        for (int n = 0; n < 8; n++) ref_s |= ((((i >> n) & 1) + ((j >> n) & 1)) % 2) << n;
        check(int'(s) == ref_s, $sformatf("%0d+%0d", i, j));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
