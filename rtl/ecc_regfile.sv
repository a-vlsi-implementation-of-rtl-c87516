// ecc_regfile: register file of the arithmetic unit.
//
// Two point registers of three M-bit words (X, Y, Z): RES (index 0) takes the
// result of a single point operation, ACC (index 1) is the running point of a
// scalar multiplication. One write port writes a whole point into the register
// selected by wsel on the rising clock edge; both registers are always
// readable. Reset clears all words.
module ecc_regfile #(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic         wsel,
  input  logic [M-1:0] wx, wy, wz,
  output logic [M-1:0] res_x, res_y, res_z,
  output logic [M-1:0] acc_x, acc_y, acc_z
);
  logic [M-1:0] rf [2][3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 2; r++)
        for (int w = 0; w < 3; w++) rf[r][w] <= '0;
    end else if (we) begin
      rf[wsel][0] <= wx;
      rf[wsel][1] <= wy;
      rf[wsel][2] <= wz;
    end
  end

  assign {res_x, res_y, res_z} = {rf[0][0], rf[0][1], rf[0][2]};
  assign {acc_x, acc_y, acc_z} = {rf[1][0], rf[1][1], rf[1][2]};
endmodule
