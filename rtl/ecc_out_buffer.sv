// ecc_out_buffer: output buffer of the ECC processor.
//
// The host reads results through this buffer: a read request (rd_en, rd_addr)
// in one cycle addresses the result memory, and the word is registered and
// presented on rd_data with rd_valid high in the next cycle. Reset clears
// both.
module ecc_out_buffer #(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rd_en,
  input  logic [3:0]   rd_addr,
  output logic [3:0]   mem_raddr,
  input  logic [M-1:0] mem_rdata,
  output logic [M-1:0] rd_data,
  output logic         rd_valid
);
  assign mem_raddr = rd_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) rd_data <= mem_rdata;
    end
  end
endmodule
