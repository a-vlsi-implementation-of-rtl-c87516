// ecc_scalar_ladder: scalar-multiplication unit, F = k*E.
//
// Runs a regular ladder over the M bits of k, most significant first, on the
// accumulator register ACC of the register file. Every bit takes the same two
// cycles whatever its value: a DBL cycle (ACC <- 2*ACC through the doubling
// datapath) and an ADD cycle in which the mixed addition ACC + P is always
// computed and written back only when the bit is 1. ACC starts at the point at
// infinity, encoded as Z = 0: doubling keeps it, and adding P to it loads
// (px, py, 1) instead of using the addition datapath, which does not handle it.
// A Z = 0 result of an addition (ACC = -P) is likewise the point at infinity.
// Timing: start in cycle 0, INIT in cycle 1, 2M ladder cycles, done is a
// one-cycle pulse in cycle 2M+2, after which ACC holds k*P.
// The source architecture names a Montgomery ladder; with only the mixed
// addition it gives, this unit keeps the ladder's fixed schedule but not its
// two-register form. The case ACC = P inside an addition is not handled.
module ecc_scalar_ladder #(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] px, py,          // affine base point
  input  logic [M-1:0] acc_x, acc_y, acc_z,
  input  logic [M-1:0] r_x, r_y, r_z,   // arithmetic-unit result
  output logic         busy,
  output logic         done,
  output logic         dbl,             // operation requested from the arithmetic unit
  output logic         we,              // write ACC
  output logic [M-1:0] wx, wy, wz
);
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_DBL, S_ADD, S_FIN} state_e;
  state_e state;
  logic [$clog2(M)-1:0] idx;
  logic acc_inf;

  assign acc_inf = (acc_z == '0);
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_FIN);
  assign dbl     = (state == S_DBL);

  always_comb begin
    we = 1'b0;
    {wx, wy, wz} = {r_x, r_y, r_z};
    case (state)
      S_INIT: begin
        we = 1'b1;
        {wx, wy, wz} = {M'(1), M'(1), M'(0)};
      end
      S_DBL: begin
        we = 1'b1;
        if (acc_inf) {wx, wy, wz} = {acc_x, acc_y, acc_z};
      end
      S_ADD: begin
        we = k[idx];
        if (acc_inf) {wx, wy, wz} = {px, py, M'(1)};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) state <= S_INIT;
        S_INIT: begin
          idx   <= ($clog2(M))'(M - 1);
          state <= S_DBL;
        end
        S_DBL:  state <= S_ADD;
        S_ADD: begin
          if (idx == '0) state <= S_FIN;
          else begin
            idx   <= idx - 1'b1;
            state <= S_DBL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
