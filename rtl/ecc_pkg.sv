// ecc_pkg: constants shared by the dual-field ECC processor.
//
// Operation codes of the control register (CTRM). The codes for the four point
// operations are the sel_field values under which the prototype shows the
// results of binary addition (1), binary doubling (2), prime addition (3) and
// prime doubling (7). The two scalar-multiplication codes (4, 5) are this
// design's own choice. The address map of the I/O bus and the result memory
// are also this design's own.
package ecc_pkg;

  // Width of one field element (8 bits in the presented configuration).
  localparam int unsigned ECC_M = 8;

  typedef enum logic [2:0] {
    OP_NOP     = 3'd0,
    OP_BF_ADD  = 3'd1,  // GF(2^m) mixed point addition
    OP_BF_DBL  = 3'd2,  // GF(2^m) projective point doubling
    OP_PF_ADD  = 3'd3,  // GF(p) mixed point addition
    OP_BF_SMUL = 3'd4,  // GF(2^m) scalar multiplication k*P
    OP_PF_SMUL = 3'd5,  // GF(p) scalar multiplication k*P
    OP_PF_DBL  = 3'd7   // GF(p) projective point doubling
  } ecc_op_e;

  // Input-buffer word addresses on the I/O bus.
  localparam logic [3:0] A_PX   = 4'd0;  // affine point P: x
  localparam logic [3:0] A_PY   = 4'd1;  // affine point P: y
  localparam logic [3:0] A_QX   = 4'd2;  // projective point Q: X
  localparam logic [3:0] A_QY   = 4'd3;  // projective point Q: Y
  localparam logic [3:0] A_QZ   = 4'd4;  // projective point Q: Z
  localparam logic [3:0] A_CA   = 4'd5;  // curve coefficient a
  localparam logic [3:0] A_CB   = 4'd6;  // curve coefficient b
  localparam logic [3:0] A_MOD  = 4'd7;  // prime p, or low m bits of f(x)
  localparam logic [3:0] A_K    = 4'd8;  // scalar k
  localparam logic [3:0] A_CTRL = 4'd15; // control register: writing starts

  // Result-memory word addresses (three words X, Y, Z per result).
  localparam logic [3:0] M_BF_ADD = 4'd0;
  localparam logic [3:0] M_BF_DBL = 4'd3;
  localparam logic [3:0] M_PF_ADD = 4'd6;
  localparam logic [3:0] M_PF_DBL = 4'd9;
  localparam logic [3:0] M_SMUL   = 4'd12;
  localparam logic [3:0] M_LASTOP = 4'd15; // opcode of the last finished operation

  // Register-file point registers.
  localparam logic RF_RES = 1'b0;  // result of a single point operation
  localparam logic RF_ACC = 1'b1;  // scalar-multiplication accumulator

  function automatic logic is_prime_op(ecc_op_e op);
    return op inside {OP_PF_ADD, OP_PF_DBL, OP_PF_SMUL};
  endfunction

  function automatic logic is_dbl_op(ecc_op_e op);
    return op inside {OP_BF_DBL, OP_PF_DBL};
  endfunction

  function automatic logic is_smul_op(ecc_op_e op);
    return op inside {OP_BF_SMUL, OP_PF_SMUL};
  endfunction

  function automatic logic [3:0] mem_slot(ecc_op_e op);
    case (op)
      OP_BF_ADD: return M_BF_ADD;
      OP_BF_DBL: return M_BF_DBL;
      OP_PF_ADD: return M_PF_ADD;
      OP_PF_DBL: return M_PF_DBL;
      default:   return M_SMUL;
    endcase
  endfunction

endpackage
