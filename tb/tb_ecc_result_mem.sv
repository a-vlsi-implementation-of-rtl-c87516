// tb_ecc_result_mem: result memory: three-word point writes with operation tag, asynchronous reads.
module tb_ecc_result_mem;
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
  logic rst_n, we;
  logic [3:0] wbase, raddr;
  logic [7:0] wx, wy, wz, rdata;
  logic [2:0] wtag;
  logic [7:0] m [16];
  logic [3:0] slots [5] = '{4'd0, 4'd3, 4'd6, 4'd9, 4'd12};
  ecc_result_mem dut (.*);
  initial begin
    rst_n = 0; we = 0; wbase = 0; raddr = 0; {wx, wy, wz} = '0; wtag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m = '{default: '0};
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wbase = slots[$urandom_range(0, 4)];
      {wx, wy, wz} = 24'($urandom); wtag = 3'($urandom);
      @(posedge clk);
      if (we) begin m[wbase] = wx; m[wbase + 1] = wy; m[wbase + 2] = wz; m[15] = 8'(wtag); end
      #1;
      we = 0;
      for (int i = 0; i < 16; i++) begin
        raddr = 4'(i); #1;
        check(rdata == m[i], $sformatf("word %0d", i));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
