// ecc_main_ctrl: main control unit with the control register (CTRM).
//
// A write of an operation code (ecc_pkg::ecc_op_e) to the control register
// while idle starts an operation; codes 0 and 6 are ignored. The controller
// decodes the code into the field select (P/B) and the point operation and
// sequences it:
//   point operation:  EXEC (register file RES <- arithmetic result),
//                     STORE (memory <- RES), FIN (done pulse)
//   scalar multiply:  LSTART (start pulse to the ladder unit), LADDER (wait
//                     for its done), STORE (memory <- ACC), FIN
// A point operation therefore reports done three cycles after the write, a
// scalar multiplication 2M+5 cycles after it. busy is high from the cycle
// after the write up to and including the done cycle.
module ecc_main_ctrl
  import ecc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ctrl_we,       // write to the control register
  input  logic [2:0] ctrl_wdata,
  input  logic     lad_done,
  output ecc_op_e  op,            // control register contents
  output logic     prime,         // field select: 1 GF(p), 0 GF(2^m)
  output logic     dbl,           // point operation: doubling
  output logic     busy,
  output logic     done,
  output logic     lad_start,
  output logic     rf_we,         // write RES
  output logic     mem_we,
  output logic [3:0] mem_base,
  output logic     mem_src_acc    // store ACC instead of RES
);
  typedef enum logic [2:0] {C_IDLE, C_EXEC, C_LSTART, C_LADDER, C_STORE, C_FIN} cstate_e;
  cstate_e state;
  ecc_op_e wop;

  assign wop         = ecc_op_e'(ctrl_wdata);
  assign prime       = is_prime_op(op);
  assign dbl         = is_dbl_op(op);
  assign busy        = (state != C_IDLE);
  assign done        = (state == C_FIN);
  assign lad_start   = (state == C_LSTART);
  assign rf_we       = (state == C_EXEC);
  assign mem_we      = (state == C_STORE);
  assign mem_base    = mem_slot(op);
  assign mem_src_acc = is_smul_op(op);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      op    <= OP_NOP;
    end else begin
      case (state)
        C_IDLE:
          if (ctrl_we && ctrl_wdata != 3'd0 && ctrl_wdata != 3'd6) begin
            op    <= wop;
            state <= is_smul_op(wop) ? C_LSTART : C_EXEC;
          end
        C_EXEC:   state <= C_STORE;
        C_LSTART: state <= C_LADDER;
        C_LADDER: if (lad_done) state <= C_STORE;
        C_STORE:  state <= C_FIN;
        default:  state <= C_IDLE;
      endcase
    end
  end
endmodule
