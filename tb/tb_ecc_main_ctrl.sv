// tb_ecc_main_ctrl: main controller: decode and sequence of every operation code, with cycle counts.
module tb_ecc_main_ctrl;
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

  localparam int WD_CYCLES = 20000;
  logic rst_n, ctrl_we, lad_done;
  logic [2:0] ctrl_wdata;
  ecc_op_e op;
  logic prime, dbl, busy, done, lad_start, rf_we, mem_we, mem_src_acc;
  logic [3:0] mem_base;
  ecc_main_ctrl dut (.*);
  initial begin
    rst_n = 0; ctrl_we = 0; ctrl_wdata = 0; lad_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic int code = $urandom_range(0, 7), cyc = 0, rfw = 0, lst = 0, memw = 0, wait_l = $urandom_range(0, 20);
      automatic bit valid = (code != 0 && code != 6);
      automatic bit sm = (code == 4 || code == 5);
      automatic bit exp_prime = (code == 3 || code == 5 || code == 7);
      automatic int exp_base = code == 1 ? 0 : code == 2 ? 3 : code == 3 ? 6 : code == 7 ? 9 : 12;
      @(negedge clk);
      ctrl_we = 1; ctrl_wdata = 3'(code);
      @(negedge clk);
      ctrl_we = 0;
      if (!valid) begin
        check(!busy, "invalid code ignored");
        continue;
      end
      check(busy && int'(op) == code, "accepted");
      check(prime == exp_prime && dbl == (code == 2 || code == 7), "decode");
      while (!done && cyc < 100) begin
        if (rf_we) rfw++;
        if (lad_start) lst++;
        if (mem_we) begin
          memw++;
          check(int'(mem_base) == exp_base && mem_src_acc == sm, "store slot");
        end
        // ladder model: done wait_l cycles after start
        if (sm && lst == 1 && !lad_done) begin
          if (wait_l == 0) lad_done = 1; else wait_l--;
        end else lad_done = 0;
        @(negedge clk); cyc++;
      end
      lad_done = 0;
      check(memw == 1 && rfw == (sm ? 0 : 1) && lst == (sm ? 1 : 0), "sequence");
      if (!sm) check(cyc == 2, $sformatf("point-op latency %0d", cyc));
      @(negedge clk);
      check(!busy && !done, "back to idle");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
