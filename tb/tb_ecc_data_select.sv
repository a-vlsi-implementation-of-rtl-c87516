// tb_ecc_data_select: P/B data selector: operands reach the selected field side only, Q from buffer or accumulator.
module tb_ecc_data_select;
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
  logic prime, use_acc;
  logic [7:0] buf_qx, buf_qy, buf_qz, acc_qx, acc_qy, acc_qz, px, py, ca, cb, modulus;
  logic [7:0] bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly;
  logic [7:0] pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p;
  ecc_data_select dut (.*);
  initial begin
    for (int n = 0; n < 400; n++) begin
      automatic logic [7:0] eq[3];
      {buf_qx, buf_qy, buf_qz, acc_qx, acc_qy, acc_qz} = {$urandom, $urandom};
      {px, py, ca, cb, modulus} = {$urandom, $urandom};
      prime = n[0]; use_acc = n[1];
      #1;
      eq = use_acc ? '{acc_qx, acc_qy, acc_qz} : '{buf_qx, buf_qy, buf_qz};
      if (prime) begin
        check({pf_qx, pf_qy, pf_qz} == {eq[0], eq[1], eq[2]}, "pf Q");
        check({pf_px, pf_py, pf_ca, pf_p} == {px, py, ca, modulus}, "pf operands");
        check({bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly} == '0, "bf idle");
      end else begin
        check({bf_qx, bf_qy, bf_qz} == {eq[0], eq[1], eq[2]}, "bf Q");
        check({bf_px, bf_py, bf_ca, bf_cb, bf_poly} == {px, py, ca, cb, modulus}, "bf operands");
        check({pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p} == '0, "pf idle");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
