// ecc_result_mem: result memory between the register file and the output
// buffer.
//
// A 16-word by M-bit array. Each finished operation stores its projective
// result X, Y, Z at three consecutive words starting at wbase (one slot per
// operation, see ecc_pkg) and its operation code at word 15, so the results
// of different operations stay side by side until overwritten. Writes happen
// on the rising clock edge; the read port is asynchronous and is registered
// by the output buffer. Reset clears the array. The memory is named in the
// source architecture; its size and slot layout are this design's own.
module ecc_result_mem
  import ecc_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [3:0]   wbase,
  input  logic [M-1:0] wx, wy, wz,
  input  logic [2:0]   wtag,
  input  logic [3:0]   raddr,
  output logic [M-1:0] rdata
);
  logic [M-1:0] mem [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) mem[i] <= '0;
    end else if (we) begin
      mem[wbase]        <= wx;
      mem[wbase + 4'd1] <= wy;
      mem[wbase + 4'd2] <= wz;
      mem[M_LASTOP]     <= M'(wtag);
    end
  end

  assign rdata = mem[raddr];
endmodule
