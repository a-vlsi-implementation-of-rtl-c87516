// tb_ecc_out_buffer: output buffer: one-cycle registered read with valid flag.
module tb_ecc_out_buffer;
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
  logic rst_n, rd_en, rd_valid;
  logic [3:0] rd_addr, mem_raddr;
  logic [7:0] mem_rdata, rd_data;
  logic [7:0] m [16];
  ecc_out_buffer dut (.*);
  assign mem_rdata = m[mem_raddr];
  initial begin
    foreach (m[i]) m[i] = 8'($urandom);
    rst_n = 0; rd_en = 0; rd_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic logic en; logic [3:0] ad; logic [7:0] prev;
      @(negedge clk);
      en = $urandom_range(0, 1); ad = 4'($urandom);
      rd_en = en; rd_addr = ad; prev = rd_data;
      @(posedge clk); #1;
      check(rd_valid == en, "valid");
      check(rd_data == (en ? m[ad] : prev), "data");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
