// tb_ecc_in_buffer: input buffer: addressed writes, lock, reset.
module tb_ecc_in_buffer;
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
  logic rst_n, wr_en, lock;
  logic [3:0] wr_addr;
  logic [7:0] wr_data;
  logic [7:0] px, py, qx, qy, qz, ca, cb, modulus, k;
  logic [7:0] m [16];
  ecc_in_buffer dut (.*);
  initial begin
    rst_n = 0; wr_en = 0; lock = 0; wr_addr = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m = '{default: '0};
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); lock = ($urandom_range(0, 3) == 0);
      wr_addr = 4'($urandom); wr_data = 8'($urandom);
      @(posedge clk);
      if (wr_en && !lock) m[wr_addr] = wr_data;
      #1;
      check({px, py, qx, qy, qz, ca, cb, modulus, k} ==
            {m[0], m[1], m[2], m[3], m[4], m[5], m[6], m[7], m[8]}, $sformatf("cycle %0d", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
