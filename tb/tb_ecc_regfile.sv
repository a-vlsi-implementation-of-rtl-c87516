// tb_ecc_regfile: register file: point writes to RES and ACC, reset, hold when not written.
module tb_ecc_regfile;
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

  localparam int WD_CYCLES = 10000;
  logic rst_n, we, wsel;
  logic [7:0] wx, wy, wz, res_x, res_y, res_z, acc_x, acc_y, acc_z;
  logic [7:0] m [2][3];
  ecc_regfile dut (.*);
  initial begin
    rst_n = 0; we = 0; wsel = 0; {wx, wy, wz} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check({res_x, res_y, res_z, acc_x, acc_y, acc_z} == '0, "reset");
    m = '{default: '0};
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wsel = $urandom_range(0, 1);
      {wx, wy, wz} = 24'($urandom);
      @(posedge clk);
      if (we) m[wsel] = '{wx, wy, wz};
      #1;
      check({res_x, res_y, res_z} == {m[0][0], m[0][1], m[0][2]}, "RES");
      check({acc_x, acc_y, acc_z} == {m[1][0], m[1][1], m[1][2]}, "ACC");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
